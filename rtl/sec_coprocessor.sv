// sec_coprocessor: security co-processor for secure partial reconfiguration.
//
// The host writes a bitstream's settings over AXI4-Lite and a DMA streams the
// bitstream through it as 32-bit words. In phase 1 the stream is a bitstream
// received encrypted under the key Ks shared with the IP source; it is
// decrypted, re-encrypted under the bitstream's own random key Ki (held in
// the on-chip key store) and streamed back out on m_axis for storage in
// external memory, while a CBC-MAC under the shared MAC key Ks_mac checks the
// received tag. In phase 2 the stored stream is decrypted under Ki and the
// plaintext goes out on the configuration-port stream (icap_*) as it is
// produced, while a CBC-MAC under the bitstream's MAC key Ki_mac is checked
// against the tag kept in the key store.
//
// Blocks: axil_regs (register file), key_store, reconfig_ctrl (run
// sequencing and MAC check), stream_upsizer / stream_downsizer (32 <-> 128
// bits) and a crypto kernel chosen by KERNEL:
//   0  3-AES kernel: one block per 10 cycles in both phases (default, the
//      configuration with the highest throughput)
//   1  1-AES kernel, rescheduled (two D registers): 30 / 20 cycles per block
//   2  1-AES kernel, one D register: 31 / 21 cycles per block
// With the 1-AES kernels, phase 2 with mac_en = 0 runs at 10 cycles per
// block. The configuration port itself (with its frame CRC check), the DMA,
// the TRNG and the host are outside: their signals are ports here.
// 'irq' is high while the last run's result is available.
// The IV register feeds all three CBC chains (provider stream, re-encrypted
// stream and MAC), so a bitstream is stored and read back with the IV it was
// received with; IV handling is this design's choice.
module sec_coprocessor
  import aes_pkg::*;
  import secdr_pkg::*;
#(
  parameter int unsigned KERNEL    = 0,
  parameter int unsigned NSLOTS    = 16,
  parameter int unsigned OUT_DEPTH = 4
) (
  input  logic        clk,
  input  logic        rst_n,
  // AXI4-Lite slave (host)
  input  logic [7:0]  s_axil_awaddr,
  input  logic        s_axil_awvalid,
  output logic        s_axil_awready,
  input  logic [31:0] s_axil_wdata,
  input  logic [3:0]  s_axil_wstrb,
  input  logic        s_axil_wvalid,
  output logic        s_axil_wready,
  output logic [1:0]  s_axil_bresp,
  output logic        s_axil_bvalid,
  input  logic        s_axil_bready,
  input  logic [7:0]  s_axil_araddr,
  input  logic        s_axil_arvalid,
  output logic        s_axil_arready,
  output logic [31:0] s_axil_rdata,
  output logic [1:0]  s_axil_rresp,
  output logic        s_axil_rvalid,
  input  logic        s_axil_rready,
  // AXI4-Stream from the DMA (bitstream words in)
  input  logic [31:0] s_axis_tdata,
  input  logic        s_axis_tvalid,
  output logic        s_axis_tready,
  // AXI4-Stream to the DMA (phase 1: re-encrypted words to external memory)
  output logic [31:0] m_axis_tdata,
  output logic        m_axis_tvalid,
  input  logic        m_axis_tready,
  // configuration port stream (phase 2: plaintext words)
  output logic [31:0] icap_data,
  output logic        icap_valid,
  input  logic        icap_ready,
  output logic        irq
);

  localparam int unsigned SLOT_W = (NSLOTS > 1) ? $clog2(NSLOTS) : 1;

  // ---- register file --------------------------------------------------------
  logic        r_start, r_ks_we, r_mac_en;
  phase_e      r_phase;
  logic [7:0]  r_slot;
  logic [31:0] r_nblocks;
  block_t      r_ks, r_ksm, r_ki, r_kim, r_iv, r_tag;
  logic        c_busy, c_done, c_mac_ok, c_mac_err;
  block_t      k_mac;

  axil_regs u_regs (
    .clk, .rst_n,
    .awaddr(s_axil_awaddr), .awvalid(s_axil_awvalid), .awready(s_axil_awready),
    .wdata(s_axil_wdata), .wstrb(s_axil_wstrb), .wvalid(s_axil_wvalid), .wready(s_axil_wready),
    .bresp(s_axil_bresp), .bvalid(s_axil_bvalid), .bready(s_axil_bready),
    .araddr(s_axil_araddr), .arvalid(s_axil_arvalid), .arready(s_axil_arready),
    .rdata(s_axil_rdata), .rresp(s_axil_rresp), .rvalid(s_axil_rvalid), .rready(s_axil_rready),
    .start(r_start), .ks_we(r_ks_we), .phase(r_phase), .mac_en(r_mac_en), .slot(r_slot),
    .nblocks(r_nblocks), .ks(r_ks), .ksm(r_ksm), .ki(r_ki), .kim(r_kim), .iv(r_iv), .tag(r_tag),
    .busy(c_busy), .done(c_done), .mac_ok(c_mac_ok), .mac_err(c_mac_err), .mac(k_mac)
  );

  // ---- key store ----------------------------------------------------------------
  logic [SLOT_W-1:0] ks_raddr;
  block_t            ks_rkey, ks_rmkey, ks_rtag;

  key_store #(.NSLOTS(NSLOTS)) u_keys (
    .clk, .we(r_ks_we), .waddr(r_slot[SLOT_W-1:0]), .wkey(r_ki), .wmkey(r_kim), .wtag(r_tag),
    .raddr(ks_raddr), .rkey(ks_rkey), .rmkey(ks_rmkey), .rtag(ks_rtag)
  );

  // ---- controller ----------------------------------------------------------------
  logic   k_key_load, k_keys_ready, k_init, k_mac_en, k_busy;
  block_t k_key_dec, k_key_enc, k_key_mac;
  phase_e k_phase;
  logic        dn_valid, dn_ready;
  logic [31:0] dn_data;
  logic   up_valid, up_ready, k_in_valid, k_in_ready, k_out_valid, k_out_ready, up_clear;
  block_t up_data, k_out_data;

  reconfig_ctrl #(.SLOT_W(SLOT_W)) u_ctrl (
    .clk, .rst_n,
    .start(r_start), .phase(r_phase), .mac_en(r_mac_en), .slot(r_slot[SLOT_W-1:0]),
    .nblocks(r_nblocks), .ks(r_ks), .ksm(r_ksm), .tag_exp(r_tag),
    .ks_raddr, .ks_rkey, .ks_rmkey, .ks_rtag,
    .key_load(k_key_load), .key_dec(k_key_dec), .key_enc(k_key_enc), .key_mac(k_key_mac),
    .keys_ready(k_keys_ready), .init(k_init), .k_phase, .k_mac_en,
    .mac(k_mac), .k_busy(k_busy || dn_valid),
    .up_valid, .up_ready, .k_in_valid, .k_in_ready, .k_out_fire(k_out_valid && k_out_ready),
    .clear(up_clear), .busy(c_busy), .done(c_done), .mac_ok(c_mac_ok), .mac_err(c_mac_err)
  );

  assign irq = c_done;

  // ---- 32 -> 128 -------------------------------------------------------------------
  stream_upsizer u_up (
    .clk, .rst_n, .clear(up_clear),
    .s_valid(s_axis_tvalid), .s_ready(s_axis_tready), .s_data(s_axis_tdata),
    .m_valid(up_valid), .m_ready(up_ready), .m_data(up_data)
  );

  // ---- crypto kernel -------------------------------------------------------------------
  generate
    if (KERNEL == 0) begin : g_k3
      crypto_kernel_3aes #(.OUT_DEPTH(OUT_DEPTH)) u_kernel (
        .clk, .rst_n, .key_load(k_key_load), .key_dec(k_key_dec), .key_enc(k_key_enc),
        .key_mac(k_key_mac), .keys_ready(k_keys_ready), .init(k_init),
        .iv_dec(r_iv), .iv_enc(r_iv), .iv_mac(r_iv), .phase(k_phase), .mac_en(k_mac_en),
        .in_valid(k_in_valid), .in_ready(k_in_ready), .in_data(up_data),
        .out_valid(k_out_valid), .out_ready(k_out_ready), .out_data(k_out_data),
        .mac(k_mac), .busy(k_busy)
      );
    end else begin : g_k1
      crypto_kernel_1aes #(.RESCHED(KERNEL == 1), .OUT_DEPTH(OUT_DEPTH)) u_kernel (
        .clk, .rst_n, .key_load(k_key_load), .key_dec(k_key_dec), .key_enc(k_key_enc),
        .key_mac(k_key_mac), .keys_ready(k_keys_ready), .init(k_init),
        .iv_dec(r_iv), .iv_enc(r_iv), .iv_mac(r_iv), .phase(k_phase), .mac_en(k_mac_en),
        .in_valid(k_in_valid), .in_ready(k_in_ready), .in_data(up_data),
        .out_valid(k_out_valid), .out_ready(k_out_ready), .out_data(k_out_data),
        .mac(k_mac), .busy(k_busy)
      );
    end
  endgenerate

  // ---- 128 -> 32, routed by phase --------------------------------------------------------

  stream_downsizer u_dn (
    .clk, .rst_n,
    .s_valid(k_out_valid), .s_ready(k_out_ready), .s_data(k_out_data),
    .m_valid(dn_valid), .m_ready(dn_ready), .m_data(dn_data)
  );

  assign m_axis_tdata  = dn_data;
  assign icap_data     = dn_data;
  assign m_axis_tvalid = dn_valid && (k_phase == PHASE1);
  assign icap_valid    = dn_valid && (k_phase == PHASE2);
  assign dn_ready      = (k_phase == PHASE1) ? m_axis_tready : icap_ready;

endmodule
