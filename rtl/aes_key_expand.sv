// aes_key_expand: AES-128 key schedule held in registers.
//
// A pulse on 'load' captures 'key' as round key 0; the ten following cycles
// derive round keys 1..10, one per cycle, using one S-box word path. 'ready'
// is low from the load until round key 10 is written and high otherwise.
// The whole schedule is an output so that a cipher core can read the round
// key of the round it is computing and, in the same cycle, round key 0 or 10
// for the block it starts.
//
// The published architecture feeds each AES round a 128-bit round key ("Key_j") but does not
// say how the keys are produced; expanding each key once when it is loaded and
// keeping the schedule is this design's choice. Keys change only between
// bitstreams, so the ten cycles are outside the data path.
module aes_key_expand
  import aes_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   load,     // capture key and start expansion
  input  block_t key,
  output sched_t sched,    // sched[r] = round key r
  output logic   ready
);

  logic [3:0] round_q;     // next round key to compute, 11 = done

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sched   <= '0;
      round_q <= 4'd11;
    end else if (load) begin
      sched[0] <= key;
      round_q  <= 4'd1;
    end else if (round_q <= 4'd10) begin
      sched[round_q] <= next_round_key(sched[round_q - 4'd1], 32'(round_q));
      round_q        <= round_q + 4'd1;
    end
  end

  assign ready = (round_q == 4'd11) && !load;

endmodule
