// stream_upsizer: packs 32-bit stream words into 128-bit AES blocks.
//
// The DMA delivers the bitstream as 32-bit words; the cipher works on 128-bit
// blocks. Four consecutive words form one block, the first word in bits
// [127:96] (bitstream word order, most significant first). The block is held
// in an output register with valid/ready; the next block's words are
// collected while it waits, so a ready consumer sees a new block every four
// accepted words. The word order is this design's choice; the published architecture only
// says that a 32-bit port is used.
module stream_upsizer (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clear,      // drop a partial block
  input  logic         s_valid,
  output logic         s_ready,
  input  logic [31:0]  s_data,
  output logic         m_valid,
  input  logic         m_ready,
  output logic [127:0] m_data
);

  logic [95:0] acc_q;
  logic [1:0]  cnt_q;
  logic        take;

  // the fourth word can be taken only if the output register is free now
  assign s_ready = (cnt_q != 2'd3) || !m_valid || m_ready;
  assign take    = s_valid && s_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc_q   <= '0;
      cnt_q   <= '0;
      m_valid <= 1'b0;
      m_data  <= '0;
    end else if (clear) begin
      cnt_q   <= '0;
      m_valid <= 1'b0;
    end else begin
      if (m_valid && m_ready) m_valid <= 1'b0;
      if (take) begin
        if (cnt_q == 2'd3) begin
          m_data  <= {acc_q, s_data};
          m_valid <= 1'b1;
        end else begin
          acc_q <= {acc_q[63:0], s_data};
        end
        cnt_q <= cnt_q + 2'd1;
      end
    end
  end

endmodule
