// tb_stream_upsizer: sends random words with random gaps into the upsizer,
// drains it with a randomly stalling consumer, and checks every 128-bit
// block against four consecutive words (first word most significant). It
// also checks that 'clear' drops a partial block, and the full rate: with
// both sides always ready, one block per four cycles.
module tb_stream_upsizer;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  logic clear, s_valid, s_ready, m_valid, m_ready;
  logic [31:0]  s_data;
  logic [127:0] m_data;
  int in_gap, out_stall;

  stream_upsizer dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0]  words [$];
  logic [127:0] blocks [$];
  int t_out [$];

  always @(posedge clk) if (m_valid && m_ready) begin blocks.push_back(m_data); t_out.push_back(cyc); end
  always @(negedge clk) m_ready <= ($urandom_range(99) >= out_stall);

  task automatic send(input int n);
    int k = 0;
    while (k < n) begin
      s_valid = ($urandom_range(99) >= in_gap);
      s_data  = words[k];
      @(posedge clk);
      if (s_valid && s_ready) k++;
      @(negedge clk);
    end
    s_valid = 0;
  endtask

  initial begin
    clear = 0; s_valid = 0; s_data = 0; in_gap = 30; out_stall = 40;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 4 * 50; i++) words.push_back($urandom);
    send(4 * 50);
    repeat (20) @(negedge clk);
    checks++;
    if (blocks.size() != 50) begin failures++; $display("FAIL got %0d blocks", blocks.size()); end
    foreach (blocks[i]) begin
      checks++;
      if (blocks[i] !== {words[4*i], words[4*i+1], words[4*i+2], words[4*i+3]}) begin
        failures++; $display("FAIL block %0d", i);
      end
    end
    // partial block, then clear
    words.delete(); blocks.delete();
    for (int i = 0; i < 2; i++) words.push_back($urandom);
    send(2);
    @(negedge clk); clear = 1; @(negedge clk); clear = 0;
    // full rate
    in_gap = 0; out_stall = 0;
    words.delete(); t_out.delete();
    for (int i = 0; i < 4 * 10; i++) words.push_back($urandom);
    repeat (2) @(negedge clk);
    send(4 * 10);
    repeat (10) @(negedge clk);
    checks++;
    if (blocks.size() != 10 || blocks[0] !== {words[0], words[1], words[2], words[3]}) begin
      failures++; $display("FAIL after clear");
    end
    for (int i = 1; i < t_out.size(); i++) begin
      checks++;
      if (t_out[i] - t_out[i-1] != 4) begin failures++; $display("FAIL rate %0d", t_out[i]-t_out[i-1]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
