// tb_aes_cbc_core: checks the folded AES-CBC core against published vectors.
//
// Vectors: the AES-128 example of FIPS-197 (appendix C.1) in both directions,
// and the four-block AES-128 CBC example of NIST SP 800-38A (F.2.1/F.2.2),
// encrypted and decrypted with blocks started back to back. It also checks
// the timing: result 11 cycles after the start and one block per 10 cycles.
module tb_aes_cbc_core;
  import aes_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic     ke_load;
  block_t   ke_key;
  sched_t   sched;
  logic     ke_ready;
  logic     start, ready, dout_valid, busy;
  aes_dir_e dir;
  block_t   din, chain, dout;
  logic     use_fb;
  logic [3:0] run_idx;

  aes_key_expand u_ke (.clk, .rst_n, .load(ke_load), .key(ke_key), .sched, .ready(ke_ready));

  aes_cbc_core dut (
    .clk, .rst_n, .start, .dir, .din, .chain, .use_fb,
    .start_rk((dir == AES_ENC) ? sched[0] : sched[10]),
    .ready, .run_rk_idx(run_idx), .run_rk(sched[run_idx]),
    .dout_valid, .dout, .busy
  );

  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // watchdog
  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input block_t got, input block_t exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic load_key(input block_t k);
    @(negedge clk); ke_key = k; ke_load = 1'b1;
    @(negedge clk); ke_load = 1'b0;
    wait (ke_ready);
    @(negedge clk);
  endtask

  // run one block alone and check result and latency
  task automatic one_block(input aes_dir_e d, input block_t i, input block_t c, input block_t exp, input string what);
    int t0;
    @(negedge clk); dir = d; din = i; chain = c; start = 1'b1;
    t0 = cyc;
    @(negedge clk); start = 1'b0;
    wait (dout_valid);
    check(what, dout, exp);
    checks++;
    if (cyc - t0 != 11) begin
      failures++;
      $display("FAIL %s latency %0d", what, cyc - t0);
    end
    @(negedge clk);
    @(negedge clk);
  endtask

  block_t iv  = 128'h000102030405060708090a0b0c0d0e0f;
  block_t pt [4] = '{128'h6bc1bee22e409f96e93d7e117393172a, 128'hae2d8a571e03ac9c9eb76fac45af8e51,
                     128'h30c81c46a35ce411e5fbc1191a0a52ef, 128'hf69f2445df4f9b17ad2b417be66c3710};
  block_t ct [4] = '{128'h7649abac8119b246cee98e9b12e9197d, 128'h5086cb9b507219ee95db113a917678b2,
                     128'h73bed6b8e3c1743b7116e69e22229516, 128'h3ff1caa1681fac09120eca307586e1a7};

  block_t got [4];
  int     tv  [4];
  int     nout;

  always @(posedge clk) if (dout_valid) begin
    if (nout < 4) begin got[nout] <= dout; tv[nout] <= cyc; end
    nout <= nout + 1;
  end

  // stream four blocks back to back; chain for encryption is the previous
  // output, taken combinationally when it appears in the start cycle
  task automatic stream4(input aes_dir_e d);
    int k;
    nout = 0;
    k = 0;
    while (k < 4) begin
      @(negedge clk);
      dir = d;
      if (ready) begin
        din   = (d == AES_ENC) ? pt[k] : ct[k];
        // decryption chains the previous ciphertext input; encryption
        // takes the IV first and then the core's own feedback
        chain  = (k == 0) ? iv : (d == AES_DEC) ? ct[k-1] : '0;
        use_fb = (d == AES_ENC) && (k != 0);
        start = 1'b1;
        k++;
      end else start = 1'b0;
    end
    @(negedge clk); start = 1'b0; use_fb = 1'b0;
    wait (nout == 4);
    @(negedge clk);
  endtask

  initial begin
    ke_load = 0; ke_key = '0; use_fb = 0; start = 0; dir = AES_ENC; din = '0; chain = '0; nout = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // FIPS-197 C.1
    load_key(128'h000102030405060708090a0b0c0d0e0f);
    one_block(AES_ENC, 128'h00112233445566778899aabbccddeeff, '0, 128'h69c4e0d86a7b0430d8cdb78070b4c55a, "fips enc");
    one_block(AES_DEC, 128'h69c4e0d86a7b0430d8cdb78070b4c55a, '0, 128'h00112233445566778899aabbccddeeff, "fips dec");
    // FIPS-197 B
    load_key(128'h2b7e151628aed2a6abf7158809cf4f3c);
    one_block(AES_ENC, 128'h3243f6a8885a308d313198a2e0370734, '0, 128'h3925841d02dc09fbdc118597196a0b32, "fips B enc");
    // SP 800-38A CBC, same key
    stream4(AES_ENC);
    for (int i = 0; i < 4; i++) check($sformatf("cbc enc %0d", i), got[i], ct[i]);
    for (int i = 1; i < 4; i++) begin
      checks++;
      if (tv[i] - tv[i-1] != 10) begin failures++; $display("FAIL enc spacing %0d", tv[i]-tv[i-1]); end
    end
    stream4(AES_DEC);
    for (int i = 0; i < 4; i++) check($sformatf("cbc dec %0d", i), got[i], pt[i]);
    for (int i = 1; i < 4; i++) begin
      checks++;
      if (tv[i] - tv[i-1] != 10) begin failures++; $display("FAIL dec spacing %0d", tv[i]-tv[i-1]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
