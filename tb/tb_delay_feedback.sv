// tb_delay_feedback: self-checking testbench of the feedback delay line.
// Three instances: DEPTH 64 and 4 (double-width single-port memory) and
// DEPTH 3 (shift register). Random data with random enable gaps; once DEPTH
// steps have passed, every step checks dout == din of DEPTH steps before.
module tb_delay_feedback;
  localparam int unsigned WIDTH = 14;

  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic [WIDTH-1:0] din = '0;
  logic [WIDTH-1:0] dout64, dout4, dout3;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  delay_feedback #(.DEPTH(64), .WIDTH(WIDTH)) u_d64 (.clk(clk), .rst_n(rst_n), .en(en), .din(din), .dout(dout64));
  delay_feedback #(.DEPTH(4),  .WIDTH(WIDTH)) u_d4  (.clk(clk), .rst_n(rst_n), .en(en), .din(din), .dout(dout4));
  delay_feedback #(.DEPTH(3),  .WIDTH(WIDTH)) u_d3  (.clk(clk), .rst_n(rst_n), .en(en), .din(din), .dout(dout3));

  logic [WIDTH-1:0] hist [$];

  task automatic check(input int d, input logic [WIDTH-1:0] got);
    checks++;
    if (got !== hist[hist.size() - d]) begin
      failures++;
      if (failures < 10) $display("FAIL: depth %0d step %0d got %h expected %h", d, hist.size(), got, hist[hist.size() - d]);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 3000; t++) begin
      en  = ($urandom_range(99) < 80);
      din = WIDTH'($urandom);
      if (en) begin
        if (hist.size() >= 64) check(64, dout64);
        if (hist.size() >= 4)  check(4, dout4);
        if (hist.size() >= 3)  check(3, dout3);
        hist.push_back(din);
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
