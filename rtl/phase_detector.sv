// phase_detector: measures the phase between the Recovered Clock and the
// Reference Clock in Fast Clock ticks.
//
// A rising edge of the Recovered Clock starts a window ("Start") and clears a
// tick counter clocked by the Fast Clock. The first Reference rising edge in
// the window stops it ("Stop") and holds the count. The next Recovered Clock
// rising edge validates the held count, emitting it on phase/phase_valid, and
// starts the next window at once. If no Reference edge arrived in the window
// the sample is not validated: nothing is sent on, so a lost Reference pulse
// (or a Manchester bit slot with no rising edge) puts no error into the loop;
// a one-cycle `lost` pulse reports it instead. Further Reference edges in a
// window after the first are ignored.
//
// The Start/Stop/validate sequence and the lost-pulse rule follow the
// paper. The Reference input is asynchronous and goes through a two
// flip-flop synchronizer. With SYNC_REC = 1 the Recovered Clock is an
// asynchronous level from another clock domain (the VCXO clock in the hybrid
// PLL) and is synchronised the same way, so both paths have equal latency and
// the delay cancels in the measurement. With SYNC_REC = 0 rec_in is a
// single-cycle pulse already in the Fast Clock domain (all-digital PLL).
//
// Timing: phase = (Fast Clock cycle of the Reference edge) - (cycle of the
// Recovered edge), in [0, 2**PHASE_W - 1] (the counter saturates).
// phase_valid is a one-cycle pulse two cycles after the validating Recovered
// edge is seen at the input with SYNC_REC = 1, and one cycle after rec_in with
// SYNC_REC = 0. enable = 0 clears the state; the first window after enabling
// gives no sample.
module phase_detector #(
  parameter int unsigned PHASE_W  = 16,
  parameter bit          SYNC_REC = 1'b1
) (
  input  logic               clk,          // Fast Clock
  input  logic               rst_n,
  input  logic               enable,
  input  logic               ref_in,       // Reference Clock input, asynchronous
  input  logic               rec_in,       // Recovered Clock (level or pulse, see SYNC_REC)
  output logic [PHASE_W-1:0] phase,
  output logic               phase_valid,
  output logic               lost
);
  logic ref_s, ref_q, rec_s, rec_q;
  logic ref_rise, rec_rise;
  logic started, stopped;
  logic [PHASE_W-1:0] count, stop_count;

  sync_2ff #(.W(1)) u_ref_sync (.clk(clk), .rst_n(rst_n), .d(ref_in), .q(ref_s));

  if (SYNC_REC) begin : g_rec_async
    sync_2ff #(.W(1)) u_rec_sync (.clk(clk), .rst_n(rst_n), .d(rec_in), .q(rec_s));
  end else begin : g_rec_sync
    assign rec_s = rec_in;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ref_q <= 1'b0;
      rec_q <= 1'b0;
    end else begin
      ref_q <= ref_s;
      rec_q <= rec_s;
    end
  end

  assign ref_rise = ref_s & ~ref_q;
  assign rec_rise = SYNC_REC ? (rec_s & ~rec_q) : rec_s;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      started     <= 1'b0;
      stopped     <= 1'b0;
      count       <= '0;
      stop_count  <= '0;
      phase       <= '0;
      phase_valid <= 1'b0;
      lost        <= 1'b0;
    end else begin
      phase_valid <= 1'b0;
      lost        <= 1'b0;
      if (!enable) begin
        started <= 1'b0;
        stopped <= 1'b0;
        count   <= '0;
      end else if (rec_rise) begin
        // Validation of the previous window, then a new Start.
        if (started) begin
          if (stopped) begin
            phase       <= stop_count;
            phase_valid <= 1'b1;
          end else begin
            lost <= 1'b1;
          end
        end
        started    <= 1'b1;
        count      <= PHASE_W'(1);
        stopped    <= ref_rise;
        stop_count <= '0;
      end else if (started) begin
        if (count != '1) count <= count + 1'b1;
        if (ref_rise && !stopped) begin
          stopped    <= 1'b1;
          stop_count <= count;
        end
      end
    end
  end

  // A sample is either validated or lost, never both.
  a_valid_xor_lost: assert property (@(posedge clk) disable iff (!rst_n) !(phase_valid && lost));
endmodule
