// tb_sigma_delta_modulator: self-checking test of the first-order
// sigma-delta modulator.
//
// For random fractions, the modulator is enabled 2**FRAC_W times; exactly
// `frac` of those enables must produce a tick (the average equals the
// fraction). The tick pattern is also compared enable by enable with an
// independent model (tick k is 1 when floor((k+1)*frac / 2**FRAC_W) rises),
// and the output must not move while en is low.
`timescale 1ns/1ps
module tb_sigma_delta_modulator;
  localparam int FW = 10;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic [FW-1:0] frac = '0;
  logic tick;
  int checks = 0, failures = 0;

  sigma_delta_modulator #(.FRAC_W(FW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int f, ticks, mism;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int r = 0; r < 12; r++) begin
      // restart from a zero accumulator so the model's phase matches
      @(negedge clk);
      rst_n = 1'b0;
      @(negedge clk);
      rst_n = 1'b1;
      f = (r == 0) ? 0 : (r == 1) ? (1 << FW) - 1 : (r == 2) ? (1 << FW) / 3 : int'($urandom % (1 << FW));
      frac = FW'(f);
      ticks = 0;
      mism = 0;
      for (int k = 0; k < (1 << FW); k++) begin
        @(negedge clk);
        en = 1'b1;
        #1;
        if (tick) ticks++;
        if (tick != (((k + 1) * f) / (1 << FW) != (k * f) / (1 << FW))) mism++;
        @(negedge clk);
        en = 1'b0;
        // idle cycle: state must hold
        if ($urandom % 2) begin
          logic t0;
          t0 = tick;
          @(negedge clk);
          if (tick != t0) mism++;
        end
      end
      checks++;
      if (ticks != f) begin
        failures++;
        $display("FAIL: frac %0d gave %0d ticks in %0d periods", f, ticks, 1 << FW);
      end
      checks++;
      if (mism != 0) begin
        failures++;
        $display("FAIL: frac %0d: %0d ticks differ from the model", f, mism);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
