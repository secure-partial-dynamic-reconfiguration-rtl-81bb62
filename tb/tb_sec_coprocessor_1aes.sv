// tb_sec_coprocessor_1aes: the co-processor built with the 1-AES kernels,
// KERNEL = 1 (rescheduled, two D registers) and KERNEL = 2 (one D
// register), side by side. Each runs phase 1, phase 2 with MAC and phase 2
// without MAC over the same 24-block stream with the DMA and the
// configuration port always ready, checks the data and the MAC verdict,
// and measures the steady-state spacing of the output blocks:
//   KERNEL = 1: 30 / 20 / 10 cycles per block
//   KERNEL = 2: 31 / 21 / 10 cycles per block
module tb_sec_coprocessor_1aes;
  import secdr_pkg::*;
  import aes_ref_pkg::*;

  localparam int NBLK = 24;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic chk(input string what, input logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // shared stimulus, computed once
  blk_t        ks, ksm, ki, kim, iv, tag_p, tag_i;
  logic [31:0] plain_w [$], enc_ks_w [$], enc_ki_w [$];
  bit          stim_ready = 0;
  int          finished = 0;

  initial begin
    blk_t pb [$], c1 [$], c2 [$], dummy [$];
    ks  = {$urandom, $urandom, $urandom, $urandom};
    ksm = {$urandom, $urandom, $urandom, $urandom};
    ki  = {$urandom, $urandom, $urandom, $urandom};
    kim = {$urandom, $urandom, $urandom, $urandom};
    iv  = {$urandom, $urandom, $urandom, $urandom};
    for (int i = 0; i < NBLK; i++) pb.push_back({$urandom, $urandom, $urandom, $urandom});
    tag_p = cbc_encrypt(ksm, iv, pb, dummy);
    tag_i = cbc_encrypt(kim, iv, pb, dummy);
    void'(cbc_encrypt(ks, iv, pb, c1));
    void'(cbc_encrypt(ki, iv, pb, c2));
    foreach (pb[i]) for (int k = 0; k < 4; k++) begin
      plain_w.push_back(pb[i][127-32*k -: 32]);
      enc_ks_w.push_back(c1[i][127-32*k -: 32]);
      enc_ki_w.push_back(c2[i][127-32*k -: 32]);
    end
    stim_ready = 1;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  for (genvar g = 1; g <= 2; g++) begin : g_dut
    logic [7:0]  awaddr, araddr;
    logic        awvalid, awready, wvalid, wready, bvalid, bready, arvalid, arready, rvalid, rready;
    logic [31:0] wdata, rdata, s_data, m_data, icap_data;
    logic [1:0]  bresp, rresp;
    logic        s_valid, s_ready, m_valid, icap_valid, irq;
    logic [31:0] got [$];
    int          t_blk [$];

    sec_coprocessor #(.KERNEL(g)) dut (
      .clk, .rst_n,
      .s_axil_awaddr(awaddr), .s_axil_awvalid(awvalid), .s_axil_awready(awready),
      .s_axil_wdata(wdata), .s_axil_wstrb(4'hf), .s_axil_wvalid(wvalid), .s_axil_wready(wready),
      .s_axil_bresp(bresp), .s_axil_bvalid(bvalid), .s_axil_bready(bready),
      .s_axil_araddr(araddr), .s_axil_arvalid(arvalid), .s_axil_arready(arready),
      .s_axil_rdata(rdata), .s_axil_rresp(rresp), .s_axil_rvalid(rvalid), .s_axil_rready(rready),
      .s_axis_tdata(s_data), .s_axis_tvalid(s_valid), .s_axis_tready(s_ready),
      .m_axis_tdata(m_data), .m_axis_tvalid(m_valid), .m_axis_tready(1'b1),
      .icap_data, .icap_valid, .icap_ready(1'b1), .irq
    );

    // collect output words and the cycle at which each block's first word leaves
    always @(posedge clk) begin
      if (m_valid) begin
        if (got.size() % 4 == 0) t_blk.push_back(cyc);
        got.push_back(m_data);
      end
      if (icap_valid) begin
        if (got.size() % 4 == 0) t_blk.push_back(cyc);
        got.push_back(icap_data);
      end
    end

    task automatic wr(input logic [7:0] a, input logic [31:0] d);
      @(negedge clk);
      awaddr = a; awvalid = 1; wdata = d; wvalid = 1; bready = 1;
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

    task automatic run(input logic [31:0] ctrl, input logic [31:0] words [$], output logic [31:0] st);
      int k = 0;
      got.delete(); t_blk.delete();
      wr(REG_NBLOCKS, NBLK);
      wr(REG_CTRL, ctrl);
      wait (!irq);
      while (k < words.size()) begin
        s_valid = 1; s_data = words[k];
        @(posedge clk);
        if (s_ready) k++;
        @(negedge clk);
      end
      s_valid = 0;
      wait (irq);
      rd(REG_STATUS, st);
    endtask

    // steady state: skip the first blocks (pipeline filling) and the last
    // one (no decryption left to interleave, so it may come sooner)
    function automatic int spacing_ok(input int exp);
      int n = 0;
      for (int b = 3; b < t_blk.size() - 1; b++) if (t_blk[b] - t_blk[b-1] == exp) n++;
      return t_blk.size() == NBLK && n == NBLK - 4;
    endfunction

    initial begin
      logic [31:0] st;
      string       nm;
      nm = $sformatf("KERNEL=%0d", g);
      awaddr = 0; araddr = 0; awvalid = 0; wvalid = 0; bready = 0; arvalid = 0; rready = 0;
      wdata = 0; s_valid = 0; s_data = 0;
      wait (stim_ready && rst_n);
      wr128(REG_KS, ks); wr128(REG_KSM, ksm); wr128(REG_IV, iv);
      wr128(REG_KI, ki); wr128(REG_KIM, kim); wr128(REG_TAG, tag_i);
      wr(REG_CTRL, 32'h0000_0208);                    // slot 2
      wr128(REG_TAG, tag_p);
      // phase 1
      run(32'h0000_0201, enc_ks_w, st);
      chk({nm, " p1 status"}, st[3:0] == 4'b0110);
      chk({nm, " p1 data"}, got == enc_ki_w);
      chk($sformatf("%s p1 %0d cycles/block", nm, (g == 1) ? 30 : 31), spacing_ok((g == 1) ? 30 : 31));
      // phase 2 with MAC
      run(32'h0000_0207, enc_ki_w, st);
      chk({nm, " p2 status"}, st[3:0] == 4'b0110);
      chk({nm, " p2 data"}, got == plain_w);
      chk($sformatf("%s p2 %0d cycles/block", nm, (g == 1) ? 20 : 21), spacing_ok((g == 1) ? 20 : 21));
      // phase 2 without MAC
      run(32'h0000_0203, enc_ki_w, st);
      chk({nm, " p2 no-MAC status"}, st[3:0] == 4'b0010);
      chk({nm, " p2 no-MAC data"}, got == plain_w);
      chk({nm, " p2 no-MAC 10 cycles/block"}, spacing_ok(10));
      finished++;
    end
  end

  initial begin
    wait (finished == 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
