// stream_downsizer: sends a 128-bit block as four 32-bit words.
//
// Bits [127:96] leave first, matching stream_upsizer, so a bitstream keeps
// its word order through the cipher. A block is taken when the last word of
// the previous one leaves (or when nothing is held), so with a ready consumer
// one word leaves per cycle and the downsizer is never the bottleneck of a
// cipher producing a block every ten cycles.
module stream_downsizer (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         s_valid,
  output logic         s_ready,
  input  logic [127:0] s_data,
  output logic         m_valid,
  input  logic         m_ready,
  output logic [31:0]  m_data
);

  logic [127:0] buf_q;
  logic [2:0]   left_q;     // words still to send

  assign m_valid = (left_q != 3'd0);
  assign m_data  = buf_q[127:96];
  assign s_ready = (left_q == 3'd0) || (left_q == 3'd1 && m_ready);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      buf_q  <= '0;
      left_q <= '0;
    end else if (s_valid && s_ready) begin
      buf_q  <= s_data;
      left_q <= 3'd4;
    end else if (m_valid && m_ready) begin
      buf_q  <= {buf_q[95:0], 32'h0};
      left_q <= left_q - 3'd1;
    end
  end

endmodule
