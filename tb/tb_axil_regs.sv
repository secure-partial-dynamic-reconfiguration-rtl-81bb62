// tb_axil_regs: AXI4-Lite accesses to the register file. Checks that written
// values reach the outputs (with byte strobes), that start and key-store
// write are one-cycle pulses, that the key registers read as zero, that the
// status and MAC inputs read back, and that responses wait for a slow master.
module tb_axil_regs;
  import secdr_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [7:0]   awaddr, araddr;
  logic         awvalid, awready, wvalid, wready, bvalid, bready, arvalid, arready, rvalid, rready;
  logic [31:0]  wdata, rdata;
  logic [3:0]   wstrb;
  logic [1:0]   bresp, rresp;
  logic         start, ks_we, mac_en, busy, done, mac_ok, mac_err;
  phase_e       phase;
  logic [7:0]   slot;
  logic [31:0]  nblocks;
  logic [127:0] ks, ksm, ki, kim, iv, tag, mac;

  axil_regs dut (.*);

  int n_start, n_we;
  always @(posedge clk) if (rst_n) begin
    if (start) n_start++;
    if (ks_we) n_we++;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input string what, input logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic wr(input logic [7:0] a, input logic [31:0] d, input logic [3:0] s = 4'hf);
    @(negedge clk);
    awaddr = a; awvalid = 1; wdata = d; wstrb = s; wvalid = 1;
    do @(posedge clk); while (!(awready && wready));
    @(negedge clk); awvalid = 0; wvalid = 0;
    bready = 0;
    repeat ($urandom_range(3)) @(negedge clk);
    chk("bvalid held", bvalid && bresp == 2'b00);
    bready = 1;
    @(posedge clk);
    @(negedge clk); bready = 0;
  endtask

  task automatic rd(input logic [7:0] a, output logic [31:0] d);
    @(negedge clk);
    araddr = a; arvalid = 1;
    do @(posedge clk); while (!arready);
    @(negedge clk); arvalid = 0;
    repeat ($urandom_range(3)) @(negedge clk);
    chk("rvalid", rvalid && rresp == 2'b00);
    d = rdata;
    rready = 1;
    @(posedge clk);
    @(negedge clk); rready = 0;
  endtask

  task automatic wr128(input logic [7:0] base, input logic [127:0] v);
    for (int k = 0; k < 4; k++) wr(base + 8'(4*k), v[127-32*k -: 32]);
  endtask

  initial begin
    logic [31:0]  d;
    logic [127:0] vks, vki, viv, vtag, vksm, vkim;
    awaddr = 0; araddr = 0; awvalid = 0; wvalid = 0; bready = 0; arvalid = 0; rready = 0;
    wdata = 0; wstrb = 0; busy = 0; done = 0; mac_ok = 0; mac_err = 0; mac = '0;
    n_start = 0; n_we = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    vks  = {$urandom, $urandom, $urandom, $urandom};
    vki  = {$urandom, $urandom, $urandom, $urandom};
    viv  = {$urandom, $urandom, $urandom, $urandom};
    vtag = {$urandom, $urandom, $urandom, $urandom};
    vksm = {$urandom, $urandom, $urandom, $urandom};
    vkim = {$urandom, $urandom, $urandom, $urandom};
    wr128(REG_KSM, vksm); wr128(REG_KIM, vkim);
    chk("ksm", ksm == vksm); chk("kim", kim == vkim);
    wr128(REG_KS, vks); wr128(REG_KI, vki); wr128(REG_IV, viv); wr128(REG_TAG, vtag);
    chk("ks", ks == vks); chk("ki", ki == vki); chk("iv", iv == viv); chk("tag", tag == vtag);
    wr(REG_NBLOCKS, 32'h0000_1234);
    chk("nblocks", nblocks == 32'h1234);
    wr(REG_NBLOCKS, 32'hab00_0000, 4'b1000);
    chk("nblocks strobe", nblocks == 32'hab00_1234);
    // phase 2, mac_en, slot 7, key store write
    wr(REG_CTRL, 32'h0000_070e);
    chk("phase", phase == PHASE2); chk("mac_en", mac_en); chk("slot", slot == 8'd7);
    chk("we pulse", n_we == 1); chk("no start", n_start == 0);
    wr(REG_CTRL, 32'h0000_0707);
    chk("start pulse", n_start == 1); chk("we once", n_we == 1);
    // reads
    rd(REG_CTRL, d); chk("ctrl read", d == 32'h0000_0706);
    rd(REG_NBLOCKS, d); chk("nblocks read", d == 32'hab00_1234);
    rd(REG_KS, d); chk("ks hidden", d == 0);
    rd(REG_KI + 4, d); chk("ki hidden", d == 0);
    rd(REG_KSM, d); chk("ksm hidden", d == 0);
    rd(REG_KIM + 12, d); chk("kim hidden", d == 0);
    rd(REG_IV + 8, d); chk("iv read", d == viv[63:32]);
    rd(REG_TAG + 12, d); chk("tag read", d == vtag[31:0]);
    busy = 1; done = 0; mac_ok = 1; mac_err = 0;
    rd(REG_STATUS, d); chk("status", d == 32'h5);
    busy = 0; done = 1; mac_ok = 0; mac_err = 1;
    rd(REG_STATUS, d); chk("status 2", d == 32'ha);
    mac = {$urandom, $urandom, $urandom, $urandom};
    for (int k = 0; k < 4; k++) begin
      rd(REG_MAC + 8'(4*k), d); chk("mac read", d == mac[127-32*k -: 32]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
