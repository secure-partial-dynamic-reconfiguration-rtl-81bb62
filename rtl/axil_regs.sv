// axil_regs: AXI4-Lite register file of the security co-processor.
//
// The host processor programs the co-processor through these registers
// (addresses in secdr_pkg): the run settings, the shared keys Ks and Ks_mac,
// the IV, a key pair and tag to be written into the key store, and the tag expected at the
// end of a phase-1 run; it reads back the status and the last computed MAC.
// Writing CTRL with bit 0 set starts a run; bit 3 set writes KI, KIM and TAG into the
// key store slot CTRL[15:8]. The key registers cannot be read back. Both are one-cycle pulses; the other CTRL bits
// are kept. 128-bit values are four words, the word at the lowest address
// being bits [127:96].
//
// Handshake: a write is taken when address and data are both valid and no
// response is pending, and answered with OKAY one cycle later; a read is
// answered one cycle after its address. The published architecture places the
// co-processor on the AXI4-Lite bus of the host; the register map and this
// minimal slave are this design's own.
module axil_regs
  import secdr_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  // AXI4-Lite slave
  input  logic [7:0]   awaddr,
  input  logic         awvalid,
  output logic         awready,
  input  logic [31:0]  wdata,
  input  logic [3:0]   wstrb,
  input  logic         wvalid,
  output logic         wready,
  output logic [1:0]   bresp,
  output logic         bvalid,
  input  logic         bready,
  input  logic [7:0]   araddr,
  input  logic         arvalid,
  output logic         arready,
  output logic [31:0]  rdata,
  output logic [1:0]   rresp,
  output logic         rvalid,
  input  logic         rready,
  // register outputs
  output logic         start,
  output logic         ks_we,
  output phase_e       phase,
  output logic         mac_en,
  output logic [7:0]   slot,
  output logic [31:0]  nblocks,
  output logic [127:0] ks,
  output logic [127:0] ksm,
  output logic [127:0] ki,
  output logic [127:0] kim,
  output logic [127:0] iv,
  output logic [127:0] tag,
  // status inputs
  input  logic         busy,
  input  logic         done,
  input  logic         mac_ok,
  input  logic         mac_err,
  input  logic [127:0] mac
);

  logic wr;
  assign awready = awvalid && wvalid && !bvalid;
  assign wready  = awready;
  assign wr      = awready;
  assign bresp   = 2'b00;
  assign rresp   = 2'b00;
  assign arready = !rvalid;

  // byte-lane merge of a write into a 32-bit word
  function automatic logic [31:0] merge(input logic [31:0] old, input logic [31:0] d, input logic [3:0] s);
    logic [31:0] r;
    for (int i = 0; i < 4; i++) r[8*i +: 8] = s[i] ? d[8*i +: 8] : old[8*i +: 8];
    return r;
  endfunction

  // word k (0 = most significant) of a 128-bit value
  function automatic logic [31:0] w128(input logic [127:0] v, input logic [1:0] k);
    return v[127 - 32*k -: 32];
  endfunction

  logic [31:0] ctrl_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ctrl_q  <= '0;
      nblocks <= '0;
      ks      <= '0;
      ksm     <= '0;
      ki      <= '0;
      kim     <= '0;
      iv      <= '0;
      tag     <= '0;
      bvalid  <= 1'b0;
      start   <= 1'b0;
      ks_we   <= 1'b0;
    end else begin
      start <= 1'b0;
      ks_we <= 1'b0;
      if (bvalid && bready) bvalid <= 1'b0;
      if (wr) begin
        bvalid <= 1'b1;
        unique case ({awaddr[7:4], 4'h0})
          REG_CTRL: begin
            if (awaddr[3:2] == 2'd0) begin
              ctrl_q <= merge(ctrl_q, wdata, wstrb) & 32'h0000_ff06;
              start  <= wstrb[0] && wdata[0];
              ks_we  <= wstrb[0] && wdata[3];
            end else if (awaddr[3:2] == 2'd2) nblocks <= merge(nblocks, wdata, wstrb);
          end
          REG_KS:  ks[127 - 32*awaddr[3:2] -: 32]  <= merge(w128(ks,  awaddr[3:2]), wdata, wstrb);
          REG_KI:  ki[127 - 32*awaddr[3:2] -: 32]  <= merge(w128(ki,  awaddr[3:2]), wdata, wstrb);
          REG_KSM: ksm[127 - 32*awaddr[3:2] -: 32] <= merge(w128(ksm, awaddr[3:2]), wdata, wstrb);
          REG_KIM: kim[127 - 32*awaddr[3:2] -: 32] <= merge(w128(kim, awaddr[3:2]), wdata, wstrb);
          REG_IV:  iv[127 - 32*awaddr[3:2] -: 32]  <= merge(w128(iv,  awaddr[3:2]), wdata, wstrb);
          REG_TAG: tag[127 - 32*awaddr[3:2] -: 32] <= merge(w128(tag, awaddr[3:2]), wdata, wstrb);
          default: ;
        endcase
      end
    end
  end

  assign phase  = phase_e'(ctrl_q[1]);
  assign mac_en = ctrl_q[2];
  assign slot   = ctrl_q[15:8];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rvalid <= 1'b0;
      rdata  <= '0;
    end else begin
      if (rvalid && rready) rvalid <= 1'b0;
      if (arvalid && arready) begin
        rvalid <= 1'b1;
        unique case ({araddr[7:4], 4'h0})
          REG_CTRL: unique case (araddr[3:2])
            2'd0:    rdata <= ctrl_q;
            2'd1:    rdata <= {28'h0, mac_err, mac_ok, done, busy};
            2'd2:    rdata <= nblocks;
            default: rdata <= '0;
          endcase
          REG_IV:  rdata <= w128(iv,  araddr[3:2]);
          REG_TAG: rdata <= w128(tag, araddr[3:2]);
          REG_MAC: rdata <= w128(mac, araddr[3:2]);
          default: rdata <= '0;     // the key registers read as zero
        endcase
      end
    end
  end

  a_bresp_held: assert property (@(posedge clk) disable iff (!rst_n) bvalid && !bready |=> bvalid);
  a_rdata_held: assert property (@(posedge clk) disable iff (!rst_n) rvalid && !rready |=> $stable(rdata));

endmodule
