// tb_key_store: writes random key pairs and tags into every slot of the key store
// and reads them back in random order, checking the one-cycle read latency.
module tb_key_store;
  localparam int N = 16;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic                 we;
  logic [$clog2(N)-1:0] waddr, raddr;
  logic [127:0]         wkey, wmkey, wtag, rkey, rmkey, rtag;
  logic [127:0]         mk [N], mm [N], mt [N];

  key_store #(.NSLOTS(N)) dut (.*);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; waddr = 0; raddr = 0; wkey = 0; wmkey = 0; wtag = 0;
    for (int i = 0; i < N; i++) begin
      @(negedge clk);
      mk[i] = {$urandom, $urandom, $urandom, $urandom};
      mt[i] = {$urandom, $urandom, $urandom, $urandom};
      mm[i] = {$urandom, $urandom, $urandom, $urandom};
      we = 1; waddr = i[$clog2(N)-1:0]; wkey = mk[i]; wmkey = mm[i]; wtag = mt[i];
    end
    @(negedge clk); we = 0;
    // overwrite one slot
    @(negedge clk);
    mk[5] = ~mk[5]; we = 1; waddr = 5; wkey = mk[5]; wmkey = mm[5]; wtag = mt[5];
    @(negedge clk); we = 0;
    for (int k = 0; k < 3 * N; k++) begin
      int s = $urandom_range(N - 1);
      raddr = s[$clog2(N)-1:0];
      @(posedge clk); #1;
      checks++;
      if (rkey !== mk[s] || rmkey !== mm[s] || rtag !== mt[s]) begin failures++; $display("FAIL slot %0d", s); end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
