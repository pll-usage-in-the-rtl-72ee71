// word_sync: carries a data word with a valid strobe between two clock domains.
//
// The source registers the word and flips a toggle flag; the toggle is
// synchronised with two flip-flops in the destination domain and each change
// of it produces one destination valid pulse, at which the held word is
// sampled. The word is stable from the source strobe until well after the
// destination samples it as long as strobes are at least about four cycles of
// the slower clock apart; the PLL emits one word per decimation period or per
// PI update, thousands of cycles apart. Latency: one source cycle plus three
// destination cycles.
module word_sync #(
  parameter int unsigned W = 32
) (
  input  logic         src_clk,
  input  logic         src_rst_n,
  input  logic [W-1:0] src_data,
  input  logic         src_valid,
  input  logic         dst_clk,
  input  logic         dst_rst_n,
  output logic [W-1:0] dst_data,
  output logic         dst_valid
);
  logic [W-1:0] hold;
  logic         src_tgl;
  logic         dst_tgl_s, dst_tgl_q;

  always_ff @(posedge src_clk or negedge src_rst_n) begin
    if (!src_rst_n) begin
      hold    <= '0;
      src_tgl <= 1'b0;
    end else if (src_valid) begin
      hold    <= src_data;
      src_tgl <= ~src_tgl;
    end
  end

  sync_2ff #(.W(1)) u_sync (
    .clk(dst_clk), .rst_n(dst_rst_n), .d(src_tgl), .q(dst_tgl_s)
  );

  always_ff @(posedge dst_clk or negedge dst_rst_n) begin
    if (!dst_rst_n) begin
      dst_tgl_q <= 1'b0;
      dst_valid <= 1'b0;
      dst_data  <= '0;
    end else begin
      dst_tgl_q <= dst_tgl_s;
      dst_valid <= dst_tgl_s ^ dst_tgl_q;
      if (dst_tgl_s ^ dst_tgl_q) dst_data <= hold;
    end
  end
endmodule
