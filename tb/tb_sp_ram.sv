// tb_sp_ram: self-checking testbench of the single-port RAM (sp_ram).
// Random writes and reads against a reference array; checks the one-clock
// read latency, that rdata holds through writes and idle (en low) clocks, and
// that a disabled clock writes nothing.
module tb_sp_ram;
  localparam int unsigned WORDS = 16;
  localparam int unsigned WIDTH = 12;

  logic clk = 1'b0;
  logic en = 1'b0, we = 1'b0;
  logic [3:0] addr = '0;
  logic [WIDTH-1:0] wdata = '0, rdata;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  sp_ram #(.WORDS(WORDS), .WIDTH(WIDTH)) u_dut (
    .clk(clk), .en(en), .we(we), .addr(addr), .wdata(wdata), .rdata(rdata)
  );

  logic [WIDTH-1:0] ref_mem [WORDS];
  logic [WIDTH-1:0] last_read;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // fill every word
    for (int i = 0; i < WORDS; i++) begin
      @(negedge clk);
      en = 1'b1; we = 1'b1; addr = 4'(i); wdata = WIDTH'($urandom);
      ref_mem[i] = wdata;
    end
    @(negedge clk);
    en = 1'b1; we = 1'b0; addr = 0;
    @(negedge clk);
    last_read = ref_mem[0];
    for (int t = 0; t < 2000; t++) begin
      int op;
      checks++;
      if (rdata !== last_read) begin
        failures++;
        if (failures < 10) $display("FAIL: step %0d rdata %h expected %h", t, rdata, last_read);
      end
      op = int'($urandom_range(2));
      en = (op != 2) || ($urandom_range(1) == 0);
      we = (op == 1);
      addr = 4'($urandom);
      wdata = WIDTH'($urandom);
      @(posedge clk);
      if (en && we) ref_mem[addr] = wdata;
      else if (en) last_read = ref_mem[addr];
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
