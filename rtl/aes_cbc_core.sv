// aes_cbc_core: folded AES-128 cipher core with CBC chaining, one round per cycle.
//
// A single round unit (encryption or inverse cipher, selected per block by
// 'dir') is reused ten times per 128-bit block. A block is accepted when
// 'start' is high and 'ready' is high. In the start cycle the input
// whitening is done: for encryption state = din ^ chain ^ rk0 (the CBC xor
// is folded into the input, as in the MUX_I / xor / MUX_R path of the
// document's round datapath), for decryption state = din ^ rk10 and 'chain'
// is kept for the output xor. Cycles 1..10 after the start apply rounds
// 1..10; the tenth round result goes straight into the output register, so
// 'dout_valid' pulses in the cycle after the tenth round: eleven cycles from
// start to result. 'ready' is also high in the tenth round cycle, so a new
// block can start while the previous one finishes: one block per ten cycles,
// the rate the published architecture gives for its folded AES.
//
// Round keys come from outside: 'run_rk_idx' names the key the running round
// needs and 'run_rk' must return it in the same cycle; 'start_rk' must be
// round key 0 (encryption) or round key 10 (decryption) of the key used for
// the block being started. This lets one core switch keys block by block
// (the 1-AES kernel) or keep one key (the 3-AES kernel).
//
// CBC encryption: C_i = E(P_i ^ C_{i-1}); CBC-MAC is the same operation with
// the MAC as chain. CBC decryption: P_i = D(C_i) ^ C_{i-1}. Which value is
// the chain for a block is the caller's choice, so the core keeps no IV.
// With 'use_fb' high the chain is instead the core's own latest result,
// taken straight from the round output when that result is being finished
// in the start cycle: this feedback is what lets two chained encryptions run
// back to back at one block per ten cycles.
module aes_cbc_core
  import aes_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  logic     start,
  input  aes_dir_e dir,
  input  block_t   din,
  input  block_t   chain,
  input  logic     use_fb,
  input  block_t   start_rk,
  output logic     ready,
  output logic [3:0] run_rk_idx,
  input  block_t   run_rk,
  output logic     dout_valid,
  output block_t   dout,
  output logic     busy
);

  block_t     state_q, chain_q, rnd_out, chain_eff;
  aes_dir_e   dir_q;
  logic [3:0] rnd_q;        // round computed in this cycle, 0 = idle
  logic       last;

  assign last       = (rnd_q == 4'd10);
  assign ready      = (rnd_q == 4'd0) || last;
  assign busy       = (rnd_q != 4'd0);
  assign run_rk_idx = (dir_q == AES_ENC) ? rnd_q : 4'd10 - rnd_q;

  always_comb begin
    if (dir_q == AES_ENC) rnd_out = enc_round(state_q, run_rk, last);
    else                  rnd_out = dec_round(state_q, run_rk, last);
  end

  // own latest result: being finished now, or already in the output register
  assign chain_eff = !use_fb ? chain : (last && dir_q == AES_ENC) ? rnd_out : dout;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q    <= '0;
      chain_q    <= '0;
      dir_q      <= AES_ENC;
      rnd_q      <= '0;
      dout_valid <= 1'b0;
      dout       <= '0;
    end else begin
      dout_valid <= 1'b0;
      if (rnd_q != 4'd0) begin
        state_q <= rnd_out;
        rnd_q   <= last ? 4'd0 : rnd_q + 4'd1;
        if (last) begin
          dout       <= (dir_q == AES_DEC) ? (rnd_out ^ chain_q) : rnd_out;
          dout_valid <= 1'b1;
        end
      end
      if (start && ready) begin
        dir_q   <= dir;
        chain_q <= chain_eff;
        rnd_q   <= 4'd1;
        state_q <= (dir == AES_ENC) ? (din ^ chain_eff ^ start_rk) : (din ^ start_rk);
      end
    end
  end

endmodule
