// tb_crypto_kernel_3aes: runs a phase-1 and a phase-2 stream through the
// 3-AES kernel and compares the output stream and the final MAC with the
// reference model. Phase 1 runs with the output always ready and checks that
// a block is taken every 10 cycles; phase 2 is run twice, once at full rate
// and once with a randomly stalling consumer. A last phase-1 run has both
// random gaps in the input and a stalling consumer.
module tb_crypto_kernel_3aes;
  import aes_pkg::*;
  import secdr_pkg::*;
  import aes_ref_pkg::*;

  localparam int N = 8;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  logic   key_load, keys_ready, init, mac_en, in_valid, in_ready, out_valid, out_ready, busy;
  block_t key_dec, key_enc, key_mac, iv_dec, iv_enc, iv_mac, in_data, out_data, mac;
  phase_e phase;

  crypto_kernel_3aes dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic block_t rnd128();
    return {$urandom, $urandom, $urandom, $urandom};
  endfunction

  blk_t plain [$], cin [$], cexp [$], got [$];
  int   t_acc [$];
  int   stall_pct;

  always @(posedge clk) begin
    if (out_valid && out_ready) got.push_back(out_data);
    if (in_valid && in_ready) t_acc.push_back(cyc);
  end
  always @(negedge clk) out_ready <= ($urandom_range(99) >= stall_pct);

  task automatic run(input phase_e ph, input block_t kd, input block_t ke, input block_t km, input int stall, input int gap = 0);
    int k = 0;
    stall_pct = stall;
    @(negedge clk);
    key_dec = kd; key_enc = ke; key_mac = km; key_load = 1; phase = ph; mac_en = 1;
    @(negedge clk); key_load = 0;
    wait (keys_ready);
    @(negedge clk); init = 1;
    @(negedge clk); init = 0;
    got.delete(); t_acc.delete();
    while (k < N) begin
      in_valid = ($urandom_range(99) >= gap); in_data = cin[k];
      @(posedge clk);
      if (in_valid && in_ready) k++;
      @(negedge clk);
    end
    in_valid = 0;
    wait (got.size() == N && !busy);
    @(negedge clk);
  endtask

  task automatic cmp(input string what);
    for (int i = 0; i < N; i++) begin
      checks++;
      if (got[i] !== cexp[i]) begin failures++; $display("FAIL %s block %0d: %h vs %h", what, i, got[i], cexp[i]); end
    end
  endtask

  initial begin
    block_t ks, ki, tag, m_exp;
    blk_t   dummy [$];
    key_load = 0; init = 0; in_valid = 0; in_data = '0; phase = PHASE1; mac_en = 1;
    key_dec = '0; key_enc = '0; key_mac = '0; stall_pct = 0;
    ks = rnd128(); ki = rnd128();
    iv_dec = rnd128(); iv_enc = rnd128(); iv_mac = rnd128();
    for (int i = 0; i < N; i++) plain.push_back(rnd128());
    repeat (3) @(negedge clk);
    rst_n = 1;

    // phase 1: {P}Ks in, {P}Ki out, MAC under Ks
    void'(cbc_encrypt(ks, iv_dec, plain, cin));
    void'(cbc_encrypt(ki, iv_enc, plain, cexp));
    m_exp = cbc_encrypt(ks, iv_mac, plain, dummy);
    run(PHASE1, ks, ki, ks, 0);
    cmp("phase1");
    checks++;
    if (mac !== m_exp) begin failures++; $display("FAIL phase1 mac %h vs %h", mac, m_exp); end
    for (int i = 1; i < N; i++) begin
      checks++;
      if (t_acc[i] - t_acc[i-1] != 10) begin failures++; $display("FAIL phase1 rate %0d", t_acc[i]-t_acc[i-1]); end
    end

    // phase 2: {P}Ki in (as stored by phase 1), P out, MAC under Ki
    cin = cexp;
    cexp = plain;
    tag = cbc_encrypt(ki, iv_mac, plain, dummy);
    iv_dec = iv_enc;
    run(PHASE2, ki, ki, ki, 0);
    cmp("phase2");
    checks++;
    if (mac !== tag) begin failures++; $display("FAIL phase2 mac"); end
    for (int i = 1; i < N; i++) begin
      checks++;
      if (t_acc[i] - t_acc[i-1] != 10) begin failures++; $display("FAIL phase2 rate %0d", t_acc[i]-t_acc[i-1]); end
    end

    // phase 2 again with a stalling consumer
    run(PHASE2, ki, ki, ki, 60);
    cmp("phase2 stalled");
    checks++;
    if (mac !== tag) begin failures++; $display("FAIL phase2 stalled mac"); end

    // phase 1 again with input gaps and a stalling consumer
    void'(cbc_encrypt(ks, iv_dec, plain, cin));
    void'(cbc_encrypt(ki, iv_enc, plain, cexp));
    run(PHASE1, ks, ki, ks, 40, 50);
    cmp("phase1 gaps+stalls");
    checks++;
    if (mac !== m_exp) begin failures++; $display("FAIL phase1 gaps+stalls mac"); end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
