// tb_reconfig_ctrl: drives the run controller with a simple kernel model.
//
// The model needs 10 cycles to "expand" keys, takes one block per cycle,
// returns it after a 3-cycle delay and keeps as its MAC the xor of all
// blocks taken and of the MAC key. The testbench checks the keys chosen in
// each phase, that exactly nblocks blocks are let in although more are
// offered, and the MAC verdict for matching and non-matching tags in both
// phases, plus phase 2 without MAC.
module tb_reconfig_ctrl;
  import aes_pkg::*;
  import secdr_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        start, mac_en, key_load, keys_ready, init, k_mac_en, k_busy;
  phase_e      phase, k_phase;
  logic [3:0]  slot, ks_raddr;
  logic [31:0] nblocks;
  block_t      ks, ksm, tag_exp, ks_rkey, ks_rmkey, ks_rtag, key_dec, key_enc, key_mac, mac;
  logic        up_valid, up_ready, k_in_valid, k_in_ready, k_out_fire;
  logic        clear, busy, done, mac_ok, mac_err;

  reconfig_ctrl #(.SLOT_W(4)) dut (.*);

  // key store model: slot s holds key K0 ^ {32{s}}, MAC key ~that, tag T[s]
  block_t K0 = 128'h0f1e2d3c4b5a69788796a5b4c3d2e1f0;
  block_t T [16];
  always_ff @(posedge clk) begin
    ks_rkey  <= K0 ^ {32{ks_raddr}};
    ks_rmkey <= ~(K0 ^ {32{ks_raddr}});
    ks_rtag <= T[ks_raddr];
  end

  // kernel model
  int     kcnt;
  block_t kd_l, ke_l, km_l, acc;
  int     taken, pend [$];
  always_ff @(posedge clk) begin
    if (key_load) begin kcnt <= 10; kd_l <= key_dec; ke_l <= key_enc; km_l <= key_mac; end
    else if (kcnt > 0) kcnt <= kcnt - 1;
    if (init) acc <= km_l;
    if (k_in_valid && k_in_ready) begin acc <= acc ^ blk; taken <= taken + 1; end
  end
  assign keys_ready = (kcnt == 0) && !key_load;
  assign k_in_ready = 1'b1;
  assign mac        = acc;

  // block source: always offers, block value = counter
  block_t blk;
  int     offered;
  assign up_valid = 1'b1;
  assign blk      = {96'h0, offered[31:0]};
  always_ff @(posedge clk) if (up_valid && up_ready) offered <= offered + 1;

  // output: each taken block comes out 3 cycles later
  logic [2:0] dly;
  always_ff @(posedge clk) dly <= {dly[1:0], k_in_valid && k_in_ready};
  assign k_out_fire = dly[2];
  assign k_busy     = |dly;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input string what, input logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // expected MAC of a run: mac key ^ xor of block values first..first+n-1
  function automatic block_t xsum(input block_t k, input int first, input int n);
    block_t r = k;
    for (int i = 0; i < n; i++) r ^= {96'h0, 32'(first + i)};
    return r;
  endfunction

  task automatic run(input phase_e ph, input logic me, input int s, input int n, input block_t texp,
                     input logic exp_ok, input logic exp_err, input string what);
    int first;
    block_t ki;
    @(negedge clk);
    phase = ph; mac_en = me; slot = s[3:0]; nblocks = n; tag_exp = texp; start = 1;
    @(negedge clk); start = 0;
    first = offered;
    taken = 0;
    wait (done);
    @(negedge clk);
    ki = K0 ^ {32{s[3:0]}};
    chk({what, " blocks"}, taken == n);
    chk({what, " key_dec"}, kd_l == ((ph == PHASE1) ? ks : ki));
    chk({what, " key_enc"}, ke_l == ki);
    chk({what, " key_mac"}, km_l == ((ph == PHASE1) ? ksm : ~ki));
    chk({what, " mac_ok"},  mac_ok == exp_ok);
    chk({what, " mac_err"}, mac_err == exp_err);
    chk({what, " idle"},    !busy);
  endtask

  initial begin
    block_t m;
    start = 0; phase = PHASE1; mac_en = 0; slot = 0; nblocks = 0; tag_exp = '0;
    ks  = 128'h2b7e151628aed2a6abf7158809cf4f3c;
    ksm = 128'h000102030405060708090a0b0c0d0e0f;
    kcnt = 0; acc = '0; offered = 0; taken = 0; dly = '0;
    for (int i = 0; i < 16; i++) T[i] = {$urandom, $urandom, $urandom, $urandom};
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (3) @(negedge clk);

    // phase 1, correct tag (the MAC covers the blocks let in)
    m = xsum(ksm, offered, 7);
    run(PHASE1, 1'b0, 3, 7, m, 1'b1, 1'b0, "p1 good");
    // phase 1, wrong tag
    m = xsum(ksm, offered, 5) ^ 128'h1;
    run(PHASE1, 1'b0, 4, 5, m, 1'b0, 1'b1, "p1 bad");
    // phase 2: stored tag of slot 9 made to match
    T[9] = xsum(~(K0 ^ {32{4'd9}}), offered, 6);
    run(PHASE2, 1'b1, 9, 6, '0, 1'b1, 1'b0, "p2 good");
    // phase 2, stored tag does not match
    run(PHASE2, 1'b1, 2, 4, '0, 1'b0, 1'b1, "p2 bad");
    // phase 2 without MAC: no verdict
    run(PHASE2, 1'b0, 2, 4, '0, 1'b0, 1'b0, "p2 nomac");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
