// tb_stream_downsizer: feeds random blocks with random gaps into the
// downsizer, drains it with a randomly stalling consumer, and checks the
// word sequence (most significant word first). With both sides always
// ready it checks one word per cycle with no gap between blocks.
module tb_stream_downsizer;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  logic s_valid, s_ready, m_valid, m_ready;
  logic [127:0] s_data;
  logic [31:0]  m_data;
  int in_gap, out_stall;

  stream_downsizer dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [127:0] blocks [$];
  logic [31:0]  words [$];
  int t_out [$];

  always @(posedge clk) if (m_valid && m_ready) begin words.push_back(m_data); t_out.push_back(cyc); end
  always @(negedge clk) m_ready <= ($urandom_range(99) >= out_stall);

  task automatic send(input int n);
    int k = 0;
    while (k < n) begin
      s_valid = ($urandom_range(99) >= in_gap);
      s_data  = blocks[k];
      @(posedge clk);
      if (s_valid && s_ready) k++;
      @(negedge clk);
    end
    s_valid = 0;
  endtask

  task automatic compare(input int n);
    checks++;
    if (words.size() != 4 * n) begin failures++; $display("FAIL %0d words", words.size()); end
    for (int i = 0; i < n && 4*i+3 < words.size(); i++) begin
      checks++;
      if ({words[4*i], words[4*i+1], words[4*i+2], words[4*i+3]} !== blocks[i]) begin
        failures++; $display("FAIL block %0d", i);
      end
    end
  endtask

  initial begin
    s_valid = 0; s_data = 0; in_gap = 50; out_stall = 30;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 40; i++) blocks.push_back({$urandom, $urandom, $urandom, $urandom});
    send(40);
    repeat (200) @(negedge clk);
    compare(40);
    // full rate
    in_gap = 0; out_stall = 0;
    blocks.delete(); words.delete(); t_out.delete();
    for (int i = 0; i < 8; i++) blocks.push_back({$urandom, $urandom, $urandom, $urandom});
    repeat (2) @(negedge clk);
    send(8);
    repeat (10) @(negedge clk);
    compare(8);
    for (int i = 1; i < t_out.size(); i++) begin
      checks++;
      if (t_out[i] - t_out[i-1] != 1) begin failures++; $display("FAIL gap %0d", t_out[i]-t_out[i-1]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
