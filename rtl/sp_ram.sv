// sp_ram: single-port synchronous RAM, one access per clock.
//
// On a clock edge with en high the word at addr is either written with wdata
// (we high) or read into rdata (we low). rdata keeps the last word read until
// the next read, as a single-port SRAM macro's output latch does, so a write
// does not disturb it. Read latency is one clock. The contents are not reset.
// Used as the storage of the delay feedback lines; a synthesis flow would map
// it onto a single-port SRAM macro. Single-port memories follow the design;
// holding rdata through writes is this model's choice.
module sp_ram #(
  parameter int unsigned WORDS = 32,
  parameter int unsigned WIDTH = 32,
  localparam int unsigned AW   = (WORDS > 1) ? $clog2(WORDS) : 1
) (
  input  logic             clk,
  input  logic             en,
  input  logic             we,
  input  logic [AW-1:0]    addr,
  input  logic [WIDTH-1:0] wdata,
  output logic [WIDTH-1:0] rdata
);

  logic [WIDTH-1:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (en) begin
      if (we) mem[addr] <= wdata;
      else    rdata     <= mem[addr];
    end
  end

endmodule
