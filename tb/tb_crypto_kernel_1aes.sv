// tb_crypto_kernel_1aes: runs phase-1, phase-2 and phase-2-without-MAC
// streams through both schedules of the 1-AES kernel (RESCHED = 1 and 0)
// and compares output stream and MAC with the reference model. It also
// checks the steady-state block rate: 30/20/10 cycles per block with the
// rescheduled kernel and 31/21/10 with one D register. Each phase is then
// repeated with random input gaps and a randomly stalling consumer, where
// only data and MAC are checked.
module tb_crypto_kernel_1aes;
  import aes_pkg::*;
  import secdr_pkg::*;
  import aes_ref_pkg::*;

  localparam int N = 6;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  logic   key_load, init, mac_en, in_valid, out_ready;
  block_t key_dec, key_enc, key_mac, iv_dec, iv_enc, iv_mac, in_data;
  phase_e phase;
  logic   sel;   // 1: rescheduled kernel, 0: single D register
  logic   kr [2], ir [2], ov [2], bz [2];
  block_t od [2], mc [2];

  crypto_kernel_1aes #(.RESCHED(1'b0)) dut0 (
    .clk, .rst_n, .key_load, .key_dec, .key_enc, .key_mac, .keys_ready(kr[0]), .init,
    .iv_dec, .iv_enc, .iv_mac, .phase, .mac_en, .in_valid(in_valid && !sel), .in_ready(ir[0]),
    .in_data, .out_valid(ov[0]), .out_ready, .out_data(od[0]), .mac(mc[0]), .busy(bz[0]));
  crypto_kernel_1aes #(.RESCHED(1'b1)) dut1 (
    .clk, .rst_n, .key_load, .key_dec, .key_enc, .key_mac, .keys_ready(kr[1]), .init,
    .iv_dec, .iv_enc, .iv_mac, .phase, .mac_en, .in_valid(in_valid && sel), .in_ready(ir[1]),
    .in_data, .out_valid(ov[1]), .out_ready, .out_data(od[1]), .mac(mc[1]), .busy(bz[1]));

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic block_t rnd128();
    return {$urandom, $urandom, $urandom, $urandom};
  endfunction

  blk_t plain [$], cin [$], cexp [$], got [$];
  int   t_acc [$];
  int   stall_pct = 0;

  always @(negedge clk) out_ready <= ($urandom_range(99) >= stall_pct);

  always @(posedge clk) begin
    if (ov[sel] && out_ready) got.push_back(od[sel]);
    if (in_valid && ir[sel]) t_acc.push_back(cyc);
  end

  task automatic run(input phase_e ph, input logic me, input block_t kd, input block_t ke, input block_t km,
                      input int stall = 0, input int gap = 0);
    int k = 0;
    stall_pct = stall;
    @(negedge clk);
    key_dec = kd; key_enc = ke; key_mac = km; key_load = 1; phase = ph; mac_en = me;
    @(negedge clk); key_load = 0;
    wait (kr[sel]);
    @(negedge clk); init = 1;
    @(negedge clk); init = 0;
    got.delete(); t_acc.delete();
    while (k < N) begin
      in_valid = ($urandom_range(99) >= gap); in_data = cin[k];
      @(posedge clk);
      if (in_valid && ir[sel]) k++;
      @(negedge clk);
    end
    in_valid = 0;
    wait (got.size() == N && !bz[sel]);
    @(negedge clk);
  endtask

  task automatic cmp(input string what, input block_t m_exp, input logic chk_mac, input int rate);
    for (int i = 0; i < N; i++) begin
      checks++;
      if (got[i] !== cexp[i]) begin failures++; $display("FAIL %s block %0d", what, i); end
    end
    if (chk_mac) begin
      checks++;
      if (mc[sel] !== m_exp) begin failures++; $display("FAIL %s mac", what); end
    end
    for (int i = 2; i < N && rate > 0; i++) begin
      checks++;
      if (t_acc[i] - t_acc[i-1] != rate) begin
        failures++; $display("FAIL %s rate %0d expected %0d", what, t_acc[i]-t_acc[i-1], rate);
      end
    end
  endtask

  initial begin
    block_t ks, ki, m1, m2;
    blk_t   enc_ki [$], enc_ks [$], dummy [$];
    key_load = 0; init = 0; in_valid = 0; in_data = '0; phase = PHASE1; mac_en = 1;
    key_dec = '0; key_enc = '0; key_mac = '0; sel = 1;
    ks = rnd128(); ki = rnd128();
    iv_dec = rnd128(); iv_enc = rnd128(); iv_mac = rnd128();
    for (int i = 0; i < N; i++) plain.push_back(rnd128());
    void'(cbc_encrypt(ks, iv_dec, plain, enc_ks));
    void'(cbc_encrypt(ki, iv_enc, plain, enc_ki));
    m1 = cbc_encrypt(ks, iv_mac, plain, dummy);
    m2 = cbc_encrypt(ki, iv_mac, plain, dummy);
    repeat (3) @(negedge clk);
    rst_n = 1;

    for (int s = 1; s >= 0; s--) begin
      sel = s[0];
      // phase 1
      iv_dec = iv_enc ^ 128'h1;   // the stream from the provider uses its own IV
      void'(cbc_encrypt(ks, iv_dec, plain, enc_ks));
      cin = enc_ks; cexp = enc_ki;
      run(PHASE1, 1'b1, ks, ki, ks);
      cmp($sformatf("resched=%0d phase1", s), m1, 1'b1, s ? 30 : 31);
      // phase 2 with MAC
      iv_dec = iv_enc;
      cin = enc_ki; cexp = plain;
      run(PHASE2, 1'b1, ki, ki, ki);
      cmp($sformatf("resched=%0d phase2", s), m2, 1'b1, s ? 20 : 21);
      // phase 2 without MAC
      run(PHASE2, 1'b0, ki, ki, ki);
      cmp($sformatf("resched=%0d phase2 no mac", s), '0, 1'b0, 10);
      // the same three runs with input gaps and output stalls
      iv_dec = iv_enc ^ 128'h1;
      cin = enc_ks; cexp = enc_ki;
      run(PHASE1, 1'b1, ks, ki, ks, 50, 40);
      cmp($sformatf("resched=%0d phase1 stalled", s), m1, 1'b1, 0);
      iv_dec = iv_enc;
      cin = enc_ki; cexp = plain;
      run(PHASE2, 1'b1, ki, ki, ki, 50, 40);
      cmp($sformatf("resched=%0d phase2 stalled", s), m2, 1'b1, 0);
      run(PHASE2, 1'b0, ki, ki, ki, 70, 20);
      cmp($sformatf("resched=%0d phase2 no mac stalled", s), '0, 1'b0, 0);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
