// tb_bd_bit_strobe: sends 200 random bits at 8 clocks per bit, with a
// one-sample glitch in some bits and a slightly slow transmitter clock
// (one extra sample every 40 bits), and checks that the strobed bits equal
// the sent ones.
module tb_bd_bit_strobe;
  logic clk = 1'b0, rst_n = 1'b0, rxd = 1'b1;
  logic voted, bit_valid, bit_val;
  int checks = 0, failures = 0;
  logic sent[$];
  logic got[$];

  bd_bit_strobe dut (.clk, .rst_n, .rxd, .voted, .bit_valid, .bit_val);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (bit_valid) got.push_back(bit_val);

  initial begin
    logic b;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (20) @(negedge clk);
    // a frame-like stream: starts with a falling edge
    for (int i = 0; i < 200; i++) begin
      b = (i % 10 == 0) ? 1'b1 : (i % 10 == 1) ? 1'b0 : 1'($urandom);
      sent.push_back(b);
      for (int s = 0; s < ((i % 40 == 39) ? 9 : 8); s++) begin
        rxd = (s == 6 && i % 7 == 3) ? ~b : b;   // single-sample glitch
        @(negedge clk);
      end
    end
    rxd = 1'b1;
    repeat (40) @(negedge clk);
    // idle ones are strobed before and after the stream: the stream starts
    // at the first 1-to-0 step (its first two bits are 1, 0)
    while (got.size() > 1 && !(got[0] == 1'b1 && got[1] == 1'b0)) void'(got.pop_front());
    checks++;
    if (got.size() < sent.size()) begin
      failures++; $display("FAIL: %0d bits strobed, %0d sent", got.size(), sent.size());
    end
    for (int i = 0; i < sent.size() && i < got.size(); i++) begin
      checks++;
      if (got[i] != sent[i]) begin
        failures++;
        if (failures < 5) $display("FAIL: bit %0d got %0b want %0b", i, got[i], sent[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
