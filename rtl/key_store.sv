// key_store: on-chip table of per-bitstream keys and reference MACs.
//
// Each slot holds the unique random key under which one bitstream is kept in
// external memory, the key of its CBC-MAC, and the MAC its plaintext must
// produce when it is read back. (The MAC key is separate because a CBC-MAC
// under the decryption key and IV reproduces the last ciphertext block and
// would miss any tampering.) The table is a simple dual-port memory (one
// write port, one read port with a registered, one-cycle read) so that it maps
// onto an on-chip block RAM, which is where the published architecture keeps
// the new keys and MACs. The slot count is this design's choice.
module key_store #(
  parameter int unsigned NSLOTS = 16
) (
  input  logic                      clk,
  input  logic                      we,
  input  logic [$clog2(NSLOTS)-1:0] waddr,
  input  logic [127:0]              wkey,
  input  logic [127:0]              wmkey,
  input  logic [127:0]              wtag,
  input  logic [$clog2(NSLOTS)-1:0] raddr,
  output logic [127:0]              rkey,
  output logic [127:0]              rmkey,
  output logic [127:0]              rtag
);

  logic [383:0] mem [NSLOTS];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= {wkey, wmkey, wtag};
    {rkey, rmkey, rtag} <= mem[raddr];
  end

endmodule
