// crypto_kernel_3aes: the 3-AES cryptographic kernel, one 128-bit block per
// ten cycles in both phases.
//
// Three folded AES-CBC cores work as a pipeline. The decryption core takes
// the incoming stream; its output register is the D register of the
// document's datapath. Every decrypted block is started, in the cycle it
// appears in D, on the encryption core (phase 1 only, key K_ENC) and on the
// MAC core (CBC-MAC, key K_MAC). The stream output is the re-encrypted block
// in phase 1 (going back to external memory) and the plaintext in D in phase
// 2 (going to the configuration port). 'mac' is the running CBC-MAC; after
// the last block it is the tag of the whole stream. As in the published architecture,
// which keys are used in which phase is set outside the kernel: K_DEC is the
// shared key in phase 1 and the bitstream's own key in phase 2, and so on.
//
// Interface: 'key_load' expands key_dec/enc/mac (ten cycles, 'keys_ready');
// 'init' resets the three CBC chains to iv_dec/enc/mac, to be pulsed before
// each stream. Input and output are 128-bit valid/ready streams. A block is
// taken only when the output FIFO has room for it and for every block
// already in flight, so the kernel never drops data; with the output always
// ready, input blocks are taken every 10 cycles and the first result leaves
// 12 cycles (phase 2) or 23 cycles (phase 1) after its block was taken.
// The in-flight accounting and FIFO depth are this design's choices.
module crypto_kernel_3aes
  import aes_pkg::*;
  import secdr_pkg::*;
#(
  parameter int unsigned OUT_DEPTH = 4   // output FIFO, in blocks
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   key_load,
  input  block_t key_dec,
  input  block_t key_enc,
  input  block_t key_mac,
  output logic   keys_ready,
  input  logic   init,
  input  block_t iv_dec,
  input  block_t iv_enc,
  input  block_t iv_mac,
  input  phase_e phase,
  input  logic   mac_en,
  input  logic   in_valid,
  output logic   in_ready,
  input  block_t in_data,
  output logic   out_valid,
  input  logic   out_ready,
  output block_t out_data,
  output block_t mac,
  output logic   busy
);

  localparam int unsigned CW = $clog2(OUT_DEPTH + 1);

  sched_t sch_d, sch_e, sch_m;
  logic   rdy_d, rdy_e, rdy_m;

  aes_key_expand u_kx_dec (.clk, .rst_n, .load(key_load), .key(key_dec), .sched(sch_d), .ready(rdy_d));
  aes_key_expand u_kx_enc (.clk, .rst_n, .load(key_load), .key(key_enc), .sched(sch_e), .ready(rdy_e));
  aes_key_expand u_kx_mac (.clk, .rst_n, .load(key_load), .key(key_mac), .sched(sch_m), .ready(rdy_m));
  assign keys_ready = rdy_d && rdy_e && rdy_m;

  // ---- decryption core ---------------------------------------------------
  block_t     cprev_q;                   // previous ciphertext (CBC chain)
  logic       d_start, d_ready, d_valid, d_busy;
  logic [3:0] d_idx;
  block_t     d_out;
  logic [CW-1:0] inflight_q, fifo_cnt;
  logic       fifo_full;

  assign in_ready = d_ready && keys_ready &&
                    ((CW+1)'(inflight_q) + (CW+1)'(fifo_cnt) < (CW+1)'(OUT_DEPTH));
  assign d_start  = in_valid && in_ready;

  aes_cbc_core u_dec (
    .clk, .rst_n, .start(d_start), .dir(AES_DEC), .din(in_data), .chain(cprev_q),
    .use_fb(1'b0), .start_rk(sch_d[10]), .ready(d_ready), .run_rk_idx(d_idx),
    .run_rk(sch_d[d_idx]), .dout_valid(d_valid), .dout(d_out), .busy(d_busy)
  );

  // ---- re-encryption and MAC cores, fed from D ----------------------------
  logic       e_start, e_ready, e_valid, e_busy, e_first_q;
  logic       m_start, m_ready, m_valid, m_busy, m_first_q;
  logic [3:0] e_idx, m_idx;
  block_t     e_out, m_out;

  assign e_start = d_valid && (phase == PHASE1);
  assign m_start = d_valid && (phase == PHASE1 || mac_en);

  aes_cbc_core u_enc (
    .clk, .rst_n, .start(e_start), .dir(AES_ENC), .din(d_out), .chain(iv_enc),
    .use_fb(!e_first_q), .start_rk(sch_e[0]), .ready(e_ready), .run_rk_idx(e_idx),
    .run_rk(sch_e[e_idx]), .dout_valid(e_valid), .dout(e_out), .busy(e_busy)
  );

  aes_cbc_core u_mac (
    .clk, .rst_n, .start(m_start), .dir(AES_ENC), .din(d_out), .chain(iv_mac),
    .use_fb(!m_first_q), .start_rk(sch_m[0]), .ready(m_ready), .run_rk_idx(m_idx),
    .run_rk(sch_m[m_idx]), .dout_valid(m_valid), .dout(m_out), .busy(m_busy)
  );

  // ---- output FIFO ---------------------------------------------------------
  logic   push;
  block_t push_data;
  assign push      = (phase == PHASE1) ? e_valid : d_valid;
  assign push_data = (phase == PHASE1) ? e_out : d_out;

  block_fifo #(.WIDTH(128), .DEPTH(OUT_DEPTH)) u_ofifo (
    .clk, .rst_n, .push, .wdata(push_data), .full(fifo_full),
    .out_valid, .out_ready, .out_data, .count(fifo_cnt)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cprev_q    <= '0;
      e_first_q  <= 1'b1;
      m_first_q  <= 1'b1;
      mac        <= '0;
      inflight_q <= '0;
    end else begin
      if (init) begin
        cprev_q   <= iv_dec;
        e_first_q <= 1'b1;
        m_first_q <= 1'b1;
        mac       <= iv_mac;
      end else begin
        if (d_start) cprev_q   <= in_data;
        if (e_start) e_first_q <= 1'b0;
        if (m_start) m_first_q <= 1'b0;
        if (m_valid) mac       <= m_out;
      end
      inflight_q <= inflight_q + CW'(d_start) - CW'(push);
    end
  end

  assign busy = d_busy || e_busy || m_busy || d_valid || e_valid || m_valid || (inflight_q != '0);

  // the pipeline relies on the second-stage cores being free whenever D fills
  a_enc_free: assert property (@(posedge clk) disable iff (!rst_n) e_start |-> e_ready);
  a_mac_free: assert property (@(posedge clk) disable iff (!rst_n) m_start |-> m_ready);
  a_no_drop:  assert property (@(posedge clk) disable iff (!rst_n) push |-> !fifo_full);

endmodule
