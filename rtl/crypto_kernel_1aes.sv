// crypto_kernel_1aes: the 1-AES cryptographic kernel. One folded AES-CBC core
// is shared, block by block, between decryption (D, key K_DEC), re-encryption
// (E, key K_ENC) and CBC-MAC (M, key K_MAC).
//
// Each decrypted block waits in a D register until its follow-up operations
// have been started: E and M in phase 1, M in phase 2 when 'mac_en' is set,
// none in phase 2 without MAC (the plaintext then goes out at once). The E
// and M registers keep the two CBC chains. The scheduler runs whenever the
// core can start a block: it starts a decryption if an input block is there
// and a D register is free, else the oldest pending follow-up, else nothing.
// A follow-up cannot start before its decryption result exists, which is 11
// cycles after the decryption started.
//
//  RESCHED = 0  one D register ("option 1"): phase 2 runs D1, idle, M1, D2,
//               ... = 21 cycles per block; phase 1 runs D, idle, E, M = 31.
//  RESCHED = 1  two D registers D1/D2 ("kernel 2"): phase 2 runs D1 D2 M1 D3
//               M2 D4 M3 M4 ... = 20 cycles per block; phase 1 30 cycles.
//  mac_en = 0 in phase 2 (the variant that leaves authenticity to the
//               configuration port's frame CRC) gives one block per 10 cycles.
//
// These schedules are the published architecture's; the scheduling rule that produces them,
// the in-order service of the D registers and the output FIFO with its
// in-flight accounting are this design's. The interface is the same as
// crypto_kernel_3aes.
module crypto_kernel_1aes
  import aes_pkg::*;
  import secdr_pkg::*;
#(
  parameter bit          RESCHED   = 1'b1, // 1: two D registers (rescheduled)
  parameter int unsigned OUT_DEPTH = 4
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

  localparam int unsigned CW    = $clog2(OUT_DEPTH + 1);
  localparam int unsigned NSLOT = RESCHED ? 2 : 1;

  sched_t sch_d, sch_e, sch_m;
  logic   rdy_d, rdy_e, rdy_m;

  aes_key_expand u_kx_dec (.clk, .rst_n, .load(key_load), .key(key_dec), .sched(sch_d), .ready(rdy_d));
  aes_key_expand u_kx_enc (.clk, .rst_n, .load(key_load), .key(key_enc), .sched(sch_e), .ready(rdy_e));
  aes_key_expand u_kx_mac (.clk, .rst_n, .load(key_load), .key(key_mac), .sched(sch_m), .ready(rdy_m));
  assign keys_ready = rdy_d && rdy_e && rdy_m;

  // ---- D registers: a small in-order ring -------------------------------
  typedef struct packed {
    logic   have;     // decryption result present
    logic   need_e;
    logic   need_m;
    block_t data;
  } dslot_t;

  dslot_t     slot_q [NSLOT];
  logic       head_q, tail_q;            // oldest entry, next entry to allocate
  logic [1:0] used_q;                    // entries allocated

  logic   follow;                        // decrypted blocks need follow-ups
  assign follow = (phase == PHASE1) || mac_en;

  // ---- shared core ----------------------------------------------------------
  logic       c_start, c_ready, c_valid, c_busy, c_last, c_fb;
  logic [3:0] c_idx;
  block_t     c_din, c_chain, c_out, c_start_rk, c_run_rk;
  aes_dir_e   c_dir;
  op_e        op_run_q, op_done_q, op_new;
  logic       slot_run_q, slot_done_q;
  logic       e_first_q, m_first_q;
  block_t     e_q, m_q, cprev_q;
  logic [CW-1:0] inflight_q, fifo_cnt;
  logic       fifo_full, push;
  block_t     push_data;

  assign c_last = c_busy && c_ready;     // tenth round of a block in this cycle

  // head entry, with the result arriving this cycle forwarded
  logic   head_have;
  block_t head_data;
  dslot_t head;
  assign head      = slot_q[NSLOT == 2 ? head_q : 1'b0];
  assign head_have = (used_q != 2'd0) &&
                     (head.have || (c_valid && op_done_q == OP_D && slot_done_q == head_q));
  assign head_data = head.have ? head.data : c_out;

  logic can_d, credit;
  assign credit = (CW+1)'(inflight_q) + (CW+1)'(fifo_cnt) < (CW+1)'(OUT_DEPTH);
  assign can_d  = in_valid && credit && (!follow || used_q < 2'(NSLOT));

  always_comb begin
    op_new = OP_NONE;
    if (c_ready && keys_ready) begin
      if (can_d)                         op_new = OP_D;
      else if (head_have && head.need_e) op_new = OP_E;
      else if (head_have && head.need_m) op_new = OP_M;
    end
  end

  assign c_start  = (op_new != OP_NONE);
  assign in_ready = (op_new == OP_D);
  assign c_dir    = (op_new == OP_D) ? AES_DEC : AES_ENC;
  assign c_din    = (op_new == OP_D) ? in_data : head_data;

  // chain: previous ciphertext for D; for E/M the IV first, then the chain
  // register, the core's own feedback when the same operation ends now, or
  // the result register when it ended one cycle ago
  always_comb begin
    c_fb    = 1'b0;
    c_chain = cprev_q;
    unique case (op_new)
      OP_E: begin
        c_fb    = !e_first_q && c_last && op_run_q == OP_E;
        c_chain = e_first_q ? iv_enc : (c_valid && op_done_q == OP_E) ? c_out : e_q;
      end
      OP_M: begin
        c_fb    = !m_first_q && c_last && op_run_q == OP_M;
        c_chain = m_first_q ? iv_mac : (c_valid && op_done_q == OP_M) ? c_out : m_q;
      end
      default: ;
    endcase
  end

  // key multiplexer
  always_comb begin
    unique case (op_new)
      OP_E:    c_start_rk = sch_e[0];
      OP_M:    c_start_rk = sch_m[0];
      default: c_start_rk = sch_d[10];
    endcase
    unique case (op_run_q)
      OP_E:    c_run_rk = sch_e[c_idx];
      OP_M:    c_run_rk = sch_m[c_idx];
      default: c_run_rk = sch_d[c_idx];
    endcase
  end

  aes_cbc_core u_core (
    .clk, .rst_n, .start(c_start), .dir(c_dir), .din(c_din), .chain(c_chain),
    .use_fb(c_fb), .start_rk(c_start_rk), .ready(c_ready), .run_rk_idx(c_idx),
    .run_rk(c_run_rk), .dout_valid(c_valid), .dout(c_out), .busy(c_busy)
  );

  // ---- output ---------------------------------------------------------------
  assign push      = c_valid && (op_done_q == ((phase == PHASE1) ? OP_E : OP_D));
  assign push_data = c_out;

  block_fifo #(.WIDTH(128), .DEPTH(OUT_DEPTH)) u_ofifo (
    .clk, .rst_n, .push, .wdata(push_data), .full(fifo_full),
    .out_valid, .out_ready, .out_data, .count(fifo_cnt)
  );

  assign mac = m_q;

  // ---- state ------------------------------------------------------------------
  logic free_head;                       // last follow-up of the head started
  assign free_head = (op_new == OP_M) || (op_new == OP_E && !head.need_m);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NSLOT; i++) slot_q[i] <= '0;
      head_q      <= 1'b0;
      tail_q      <= 1'b0;
      used_q      <= '0;
      op_run_q    <= OP_NONE;
      op_done_q   <= OP_NONE;
      slot_run_q  <= 1'b0;
      slot_done_q <= 1'b0;
      e_first_q   <= 1'b1;
      m_first_q   <= 1'b1;
      e_q         <= '0;
      m_q         <= '0;
      cprev_q     <= '0;
      inflight_q  <= '0;
    end else begin
      if (c_last) begin
        op_done_q   <= op_run_q;
        slot_done_q <= slot_run_q;
      end
      if (c_start) op_run_q <= op_new;
      else if (c_last) op_run_q <= OP_NONE;

      // result write-back
      if (c_valid) begin
        unique case (op_done_q)
          OP_D: if (follow) slot_q[NSLOT == 2 ? slot_done_q : 1'b0].have <= 1'b1;
          OP_E: e_q <= c_out;
          OP_M: m_q <= c_out;
          default: ;
        endcase
        if (op_done_q == OP_D && follow)
          slot_q[NSLOT == 2 ? slot_done_q : 1'b0].data <= c_out;
      end

      // follow-up started: clear its need bit, free the entry after the last
      if (op_new == OP_E) begin
        slot_q[NSLOT == 2 ? head_q : 1'b0].need_e <= 1'b0;
        e_first_q <= 1'b0;
      end
      if (op_new == OP_M) begin
        slot_q[NSLOT == 2 ? head_q : 1'b0].need_m <= 1'b0;
        m_first_q <= 1'b0;
      end
      if (op_new == OP_D) begin
        cprev_q <= in_data;
        if (follow) begin
          slot_q[NSLOT == 2 ? tail_q : 1'b0] <= '{have: 1'b0, need_e: (phase == PHASE1),
                                                   need_m: 1'b1, data: '0};
          slot_run_q <= tail_q;
          if (NSLOT == 2) tail_q <= ~tail_q;
        end
      end
      if (c_start && op_new != OP_D) slot_run_q <= head_q;
      if (c_start && op_new != OP_D && free_head && NSLOT == 2) head_q <= ~head_q;
      used_q <= used_q + 2'((op_new == OP_D) && follow) - 2'(c_start && op_new != OP_D && free_head);

      if (init) begin
        cprev_q   <= iv_dec;
        e_first_q <= 1'b1;
        m_first_q <= 1'b1;
        m_q       <= iv_mac;
        e_q       <= iv_enc;
      end
      inflight_q <= inflight_q + CW'(op_new == OP_D) - CW'(push);
    end
  end

  assign busy = c_busy || c_valid || (used_q != '0) || (inflight_q != '0);

  a_no_drop: assert property (@(posedge clk) disable iff (!rst_n) push |-> !fifo_full);

endmodule
