// tb_sec_coprocessor: end-to-end test of the co-processor at its default
// parameters (3-AES kernel), one bitstream through both phases.
//
// The testbench builds a small partial bitstream in the 7-series layout:
// dummy header, sync word 0xAA995566, set-up commands, then frames, each
// "write FAR, frame address, write FDIR with 101 words, 101 configuration
// words, write CRC, frame CRC", then the final CRC, the desynchronise command
// and NOOP padding to whole 128-bit blocks. Configuration words, addresses
// and CRCs are random: the frame CRC is checked by the configuration port,
// which is not part of this design.
//
//  1. provisioning: the host stores the bitstream keys Ki, Ki_mac and the
//     reference tag in a key store slot;
//  2. phase 1: the bitstream, CBC-encrypted under the shared key Ks, is
//     streamed in; the re-encrypted stream must equal CBC under Ki and the
//     MAC must match the provider's tag;
//  3. phase 2: the stored stream is streamed in; the configuration-port
//     stream must be the plaintext bitstream, the MAC must match, and with
//     the consumer always ready a block must leave every 10 cycles;
//  4. the same phase 1 with a wrong tag, and phase 2 with one stored bit
//     flipped: both must report a MAC error.
// Each mechanism (input gaps, output stalls, key store write, MAC accepted,
// MAC rejected, both phases) is counted and must occur.
module tb_sec_coprocessor;
  import secdr_pkg::*;
  import aes_ref_pkg::*;

  localparam int NFRAMES = 2;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  logic [7:0]  awaddr, araddr;
  logic        awvalid, awready, wvalid, wready, bvalid, bready, arvalid, arready, rvalid, rready;
  logic [31:0] wdata, rdata;
  logic [3:0]  wstrb;
  logic [1:0]  bresp, rresp;
  logic [31:0] s_data, m_data, icap_data;
  logic        s_valid, s_ready, m_valid, m_ready, icap_valid, icap_ready, irq;

  sec_coprocessor dut (
    .clk, .rst_n,
    .s_axil_awaddr(awaddr), .s_axil_awvalid(awvalid), .s_axil_awready(awready),
    .s_axil_wdata(wdata), .s_axil_wstrb(wstrb), .s_axil_wvalid(wvalid), .s_axil_wready(wready),
    .s_axil_bresp(bresp), .s_axil_bvalid(bvalid), .s_axil_bready(bready),
    .s_axil_araddr(araddr), .s_axil_arvalid(arvalid), .s_axil_arready(arready),
    .s_axil_rdata(rdata), .s_axil_rresp(rresp), .s_axil_rvalid(rvalid), .s_axil_rready(rready),
    .s_axis_tdata(s_data), .s_axis_tvalid(s_valid), .s_axis_tready(s_ready),
    .m_axis_tdata(m_data), .m_axis_tvalid(m_valid), .m_axis_tready(m_ready),
    .icap_data, .icap_valid, .icap_ready, .irq
  );

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input string what, input logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // ---- mechanism counters ----
  int n_gap, n_mstall, n_istall, n_kswr, n_ok, n_err, n_p1, n_p2;
  always @(posedge clk) if (rst_n) begin
    if (!s_valid && src_active) n_gap++;
    if (m_valid && !m_ready) n_mstall++;
    if (icap_valid && !icap_ready) n_istall++;
  end

  // ---- AXI4-Lite master ----
  task automatic wr(input logic [7:0] a, input logic [31:0] d);
    @(negedge clk);
    awaddr = a; awvalid = 1; wdata = d; wstrb = 4'hf; wvalid = 1; bready = 1;
    do @(posedge clk); while (!awready);
    @(negedge clk); awvalid = 0; wvalid = 0;
    while (!bvalid) @(negedge clk);
    @(negedge clk);
  endtask

  task automatic rd(input logic [7:0] a, output logic [31:0] d);
    @(negedge clk);
    araddr = a; arvalid = 1; rready = 1;
    do @(posedge clk); while (!arready);
    @(negedge clk); arvalid = 0;
    while (!rvalid) @(negedge clk);
    d = rdata;
    @(negedge clk);
  endtask

  task automatic wr128(input logic [7:0] base, input logic [127:0] v);
    for (int k = 0; k < 4; k++) wr(base + 8'(4*k), v[127-32*k -: 32]);
  endtask

  // ---- streams ----
  logic [31:0] src [$], got_m [$], got_i [$];
  int          t_icap [$];
  bit          src_active;
  int          gap_pct, stall_pct;

  always @(posedge clk) begin
    if (m_valid && m_ready) got_m.push_back(m_data);
    if (icap_valid && icap_ready) begin got_i.push_back(icap_data); t_icap.push_back(cyc); end
  end
  always @(negedge clk) begin
    m_ready    <= ($urandom_range(99) >= stall_pct);
    icap_ready <= ($urandom_range(99) >= stall_pct);
  end

  task automatic stream_in();
    int k = 0;
    src_active = 1;
    while (k < src.size()) begin
      s_valid = ($urandom_range(99) >= gap_pct);
      s_data  = src[k];
      @(posedge clk);
      if (s_valid && s_ready) k++;
      @(negedge clk);
    end
    s_valid = 0;
    src_active = 0;
  endtask

  // run one phase and return the status word
  task automatic run(input phase_e ph, input int slot, input int nblk, output logic [31:0] status);
    got_m.delete(); got_i.delete(); t_icap.delete();
    wr(REG_NBLOCKS, nblk);
    wr(REG_CTRL, {16'h0, 8'(slot), 4'h0, 1'b0, 1'b1, ph == PHASE2, 1'b1});
    wait (!irq);
    fork
      stream_in();
      begin wait (irq); end
    join
    @(negedge clk);
    rd(REG_STATUS, status);
    if (ph == PHASE1) n_p1++; else n_p2++;
    if (status[2]) n_ok++;
    if (status[3]) n_err++;
  endtask

  // ---- bitstream ----
  function automatic void build(ref logic [31:0] w [$]);
    w.delete();
    repeat (8) w.push_back(32'hffff_ffff);                 // dummy header
    w.push_back(32'haa99_5566);                            // sync word
    w.push_back(32'h3000_8001); w.push_back(32'h0000_0007); // CMD: reset CRC
    w.push_back(32'h3001_8001); w.push_back(32'h0368_7093); // IDCODE (XC7VX485T)
    w.push_back(32'h3000_8001); w.push_back(32'h0000_0000); // CMD: null
    w.push_back(32'h3000_c001); w.push_back(32'h0020_0000); // MASK
    w.push_back(32'h3003_0001); w.push_back(32'h0020_0000); // CTL1
    w.push_back(32'h3000_8001); w.push_back(32'h0000_0001); // CMD: write config
    for (int f = 0; f < NFRAMES; f++) begin
      w.push_back(32'h3000_2001); w.push_back($urandom);   // FAR, frame address
      w.push_back(32'h3000_4065);                          // FDIR, 101 words
      repeat (101) w.push_back($urandom);
      w.push_back(32'h3000_0001); w.push_back($urandom);   // CRC, frame CRC
    end
    w.push_back(32'h3000_2001); w.push_back(32'h03be_0000);
    w.push_back(32'h3000_0001); w.push_back($urandom);
    w.push_back(32'h3000_8001); w.push_back(32'h0000_000d); // CMD: desync
    repeat (4) w.push_back(32'h2000_0000);                 // NOOP flush
    while (w.size() % 4 != 0) w.push_back(32'h2000_0000);
  endfunction

  function automatic void to_blocks(input logic [31:0] w [$], ref blk_t b [$]);
    b.delete();
    for (int i = 0; i < w.size(); i += 4) b.push_back({w[i], w[i+1], w[i+2], w[i+3]});
  endfunction

  function automatic void to_words(input blk_t b [$], ref logic [31:0] w [$]);
    w.delete();
    foreach (b[i]) for (int k = 0; k < 4; k++) w.push_back(b[i][127-32*k -: 32]);
  endfunction

  initial begin
    logic [31:0] bits [$], enc_ks_w [$], enc_ki_w [$], tampered [$];
    blk_t        pb [$], enc_ks [$], enc_ki [$], dummy [$];
    blk_t        ks, ksm, ki, kim, iv, tag_p, tag_i;
    logic [31:0] st;
    int          nblk, steady;

    awaddr = 0; araddr = 0; awvalid = 0; wvalid = 0; bready = 0; arvalid = 0; rready = 0;
    wdata = 0; wstrb = 0; s_valid = 0; s_data = 0; src_active = 0;
    gap_pct = 20; stall_pct = 30;
    n_gap = 0; n_mstall = 0; n_istall = 0; n_kswr = 0; n_ok = 0; n_err = 0; n_p1 = 0; n_p2 = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;

    build(bits);
    to_blocks(bits, pb);
    nblk = pb.size();
    ks = {$urandom, $urandom, $urandom, $urandom};
    ksm = {$urandom, $urandom, $urandom, $urandom};
    ki  = {$urandom, $urandom, $urandom, $urandom};    // stand for TRNG outputs
    kim = {$urandom, $urandom, $urandom, $urandom};
    iv = {$urandom, $urandom, $urandom, $urandom};
    tag_p = cbc_encrypt(ksm, iv, pb, dummy);             // provider's tag under Ks_mac
    tag_i = cbc_encrypt(kim, iv, pb, dummy);             // reference tag under Ki_mac
    void'(cbc_encrypt(ks, iv, pb, enc_ks));
    void'(cbc_encrypt(ki, iv, pb, enc_ki));
    to_words(enc_ks, enc_ks_w);
    to_words(enc_ki, enc_ki_w);
    $display("bitstream: %0d words, %0d blocks", bits.size(), nblk);

    // 1. provisioning of slot 5
    wr128(REG_KS, ks);
    wr128(REG_KSM, ksm);
    wr128(REG_IV, iv);
    wr128(REG_KI, ki);
    wr128(REG_KIM, kim);
    wr128(REG_TAG, tag_i);
    wr(REG_CTRL, 32'h0000_0508);
    n_kswr++;

    // 2. phase 1
    wr128(REG_TAG, tag_p);
    src = enc_ks_w;
    run(PHASE1, 5, nblk, st);
    chk("p1 status", st[3:0] == 4'b0110);
    chk($sformatf("p1 length %0d vs %0d", got_m.size(), enc_ki_w.size()), got_m.size() == enc_ki_w.size());
    for (int i = 0; i < got_m.size() && i < enc_ki_w.size(); i++)
      if (got_m[i] !== enc_ki_w[i]) begin chk($sformatf("p1 word %0d", i), 0); break; end
    chk("p1 data", got_m == enc_ki_w);
    chk("p1 nothing to icap", got_i.size() == 0);

    // 3. phase 2, first with stalls, then at full rate
    src = got_m;
    run(PHASE2, 5, nblk, st);
    chk("p2 status", st[3:0] == 4'b0110);
    chk("p2 data", got_i == bits);
    chk("p2 nothing to memory", got_m.size() == 0);
    gap_pct = 0; stall_pct = 0;
    src = enc_ki_w;
    run(PHASE2, 5, nblk, st);
    chk("p2 fast status", st[3:0] == 4'b0110);
    chk("p2 fast data", got_i == bits);
    steady = 0;
    for (int b = 2; b < nblk; b++) begin
      if (t_icap[4*b] - t_icap[4*(b-1)] == 10) steady++;
    end
    chk($sformatf("p2 rate (10 cycles/block for %0d of %0d)", steady, nblk - 2), steady == nblk - 2);
    gap_pct = 20; stall_pct = 30;

    // 4a. phase 1 with a wrong provider tag
    wr128(REG_TAG, tag_p ^ 128'h8000);
    src = enc_ks_w;
    run(PHASE1, 5, nblk, st);
    chk("p1 bad tag rejected", st[3:0] == 4'b1010);

    // 4b. phase 2 with one stored bit flipped
    tampered = enc_ki_w;
    tampered[77] ^= 32'h0000_0100;
    src = tampered;
    run(PHASE2, 5, nblk, st);
    chk("p2 tampering detected", st[3:0] == 4'b1010);
    chk("p2 tampered data differs", got_i != bits);

    $display("mechanisms: input gaps %0d, memory stalls %0d, port stalls %0d, key store writes %0d, MAC accepted %0d, MAC rejected %0d, phase 1 runs %0d, phase 2 runs %0d",
             n_gap, n_mstall, n_istall, n_kswr, n_ok, n_err, n_p1, n_p2);
    chk("mechanism: input gap", n_gap > 0);
    chk("mechanism: memory-side stall", n_mstall > 0);
    chk("mechanism: port-side stall", n_istall > 0);
    chk("mechanism: key store write", n_kswr > 0);
    chk("mechanism: MAC accepted", n_ok > 0);
    chk("mechanism: MAC rejected", n_err > 0);
    chk("mechanism: phase 1", n_p1 > 0);
    chk("mechanism: phase 2", n_p2 > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
