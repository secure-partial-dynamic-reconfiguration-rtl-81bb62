// reconfig_ctrl: sequences one run of the co-processor, phase 1 or phase 2.
//
// On 'start' it latches the run's settings, reads the bitstream's slot in
// the key store, loads the three kernel keys, resets the CBC chains, lets
// exactly 'nblocks' 128-bit blocks into the kernel, waits until as many have
// left it and 'k_busy' (kernel or output path still holding data) is low,
// and then compares the kernel's final MAC with the reference:
//
//   phase 1: K_DEC = Ks, K_ENC = Ki[slot], K_MAC = Ks_mac; the MAC is
//            checked against the tag supplied with the received bitstream.
//   phase 2: K_DEC = Ki[slot], K_MAC = Ki_mac[slot]; the MAC is checked
//            against the tag stored in the slot. With mac_en = 0 no MAC is computed and
//            the check is skipped (mac_ok and mac_err stay low).
//
// 'done' stays high from the end of a run until the next start. The keys per
// phase follow the published architecture's two-phase flow (validate with the shared key,
// re-encrypt under a unique random key; decrypt and MAC with that key). The
// separate MAC keys are this design's: with one key and one IV for CBC
// decryption and CBC-MAC, the MAC of the decrypted stream is always its last
// ciphertext block and tampering would go unseen. The state machine is also
// this design's choice.
module reconfig_ctrl
  import aes_pkg::*;
  import secdr_pkg::*;
#(
  parameter int unsigned SLOT_W = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  // settings from the register file
  input  logic              start,
  input  phase_e            phase,
  input  logic              mac_en,
  input  logic [SLOT_W-1:0] slot,
  input  logic [31:0]       nblocks,
  input  block_t            ks,
  input  block_t            ksm,
  input  block_t            tag_exp,
  // key store read port
  output logic [SLOT_W-1:0] ks_raddr,
  input  block_t            ks_rkey,
  input  block_t            ks_rmkey,
  input  block_t            ks_rtag,
  // kernel control
  output logic              key_load,
  output block_t            key_dec,
  output block_t            key_enc,
  output block_t            key_mac,
  input  logic              keys_ready,
  output logic              init,
  output phase_e            k_phase,
  output logic              k_mac_en,
  input  block_t            mac,
  input  logic              k_busy,
  // input gating and output counting
  input  logic              up_valid,
  output logic              up_ready,
  output logic              k_in_valid,
  input  logic              k_in_ready,
  input  logic              k_out_fire,
  // status
  output logic              clear,
  output logic              busy,
  output logic              done,
  output logic              mac_ok,
  output logic              mac_err
);

  typedef enum logic [2:0] {S_IDLE, S_READ, S_CAPT, S_LOAD, S_KWAIT, S_INIT, S_RUN, S_CHECK} state_e;

  state_e            st_q;
  phase_e            phase_q;
  logic              mac_en_q;
  logic [SLOT_W-1:0] slot_q;
  logic [31:0]       nblk_q, nin_q, nout_q;
  block_t            ki_q, kim_q, tag_q;

  assign ks_raddr = slot_q;
  assign k_phase  = phase_q;
  assign k_mac_en = mac_en_q || (phase_q == PHASE1);
  assign key_dec  = (phase_q == PHASE1) ? ks : ki_q;
  assign key_enc  = ki_q;
  assign key_mac  = (phase_q == PHASE1) ? ksm : kim_q;
  assign key_load = (st_q == S_LOAD);
  assign init     = (st_q == S_INIT);
  assign clear    = start;
  assign busy     = (st_q != S_IDLE);

  // only the run's blocks enter the kernel
  logic admit;
  assign admit      = (st_q == S_RUN) && (nin_q != nblk_q);
  assign k_in_valid = up_valid && admit;
  assign up_ready   = k_in_ready && admit;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q     <= S_IDLE;
      phase_q  <= PHASE1;
      mac_en_q <= 1'b0;
      slot_q   <= '0;
      nblk_q   <= '0;
      nin_q    <= '0;
      nout_q   <= '0;
      ki_q     <= '0;
      kim_q    <= '0;
      tag_q    <= '0;
      done     <= 1'b0;
      mac_ok   <= 1'b0;
      mac_err  <= 1'b0;
    end else begin
      unique case (st_q)
        S_IDLE: if (start) begin
          phase_q  <= phase;
          mac_en_q <= mac_en;
          slot_q   <= slot;
          nblk_q   <= nblocks;
          done     <= 1'b0;
          mac_ok   <= 1'b0;
          mac_err  <= 1'b0;
          st_q     <= S_READ;
        end
        S_READ:  st_q <= S_CAPT;            // key store read takes one cycle
        S_CAPT:  begin
          ki_q  <= ks_rkey;
          kim_q <= ks_rmkey;
          tag_q <= ks_rtag;
          st_q  <= S_LOAD;
        end
        S_LOAD:  st_q <= S_KWAIT;
        S_KWAIT: if (keys_ready) st_q <= S_INIT;
        S_INIT:  begin
          nin_q  <= '0;
          nout_q <= '0;
          st_q   <= S_RUN;
        end
        S_RUN: begin
          if (k_in_valid && k_in_ready) nin_q  <= nin_q + 32'd1;
          if (k_out_fire)               nout_q <= nout_q + 32'd1;
          if (nout_q == nblk_q && nin_q == nblk_q && !k_busy) st_q <= S_CHECK;
        end
        S_CHECK: begin
          if (phase_q == PHASE1 || mac_en_q) begin
            mac_ok  <= (mac == ((phase_q == PHASE1) ? tag_exp : tag_q));
            mac_err <= (mac != ((phase_q == PHASE1) ? tag_exp : tag_q));
          end
          done <= 1'b1;
          st_q <= S_IDLE;
        end
        default: st_q <= S_IDLE;
      endcase
    end
  end

endmodule
