// delay_feedback: the feedback delay line (FIFO) of a single-path delay
// feedback butterfly: dout = din delayed by DEPTH enabled clocks.
//
// Every clock with en high is one step: din is taken in and dout moves on to
// the next sample. dout is the sample that was taken in DEPTH steps earlier
// (out(t) = in(t - DEPTH)); it comes straight from registers.
//
// Because the delay line is always addressed consecutively, it is built from
// ONE single-port memory of double word length: two consecutive samples are
// packed into one memory word. Over every two steps the memory does one read
// (even step, of the pair that leaves next) and one write (odd step, of the
// pair collected in two registers), so a single port is enough and only one
// address counter is needed. The memory holds DEPTH/2 words of 2*WIDTH bits.
// That choice follows the design this RTL implements. Lines shorter than
// four samples, or of odd length, are plain shift registers (own choice: a
// memory macro of one or two words is not worth it).
//
// Until DEPTH steps have passed after reset dout is undefined memory content;
// the FFT marks those outputs invalid.
module delay_feedback #(
  parameter int unsigned DEPTH = 64,
  parameter int unsigned WIDTH = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  input  logic [WIDTH-1:0] din,
  output logic [WIDTH-1:0] dout
);

  if (DEPTH >= 4 && DEPTH % 2 == 0) begin : g_ram
    localparam int unsigned WORDS = DEPTH / 2;
    localparam int unsigned AW    = (WORDS > 1) ? $clog2(WORDS) : 1;

    logic              phase;     // step parity: 0 = even (read), 1 = odd (write)
    logic [AW-1:0]     pair_cnt;  // floor(step / 2) mod WORDS
    logic [AW-1:0]     waddr;
    logic [WIDTH-1:0]  first_q;   // first sample of the pair being collected
    logic [WIDTH-1:0]  second_q;  // second sample of the pair being collected
    logic [2*WIDTH-1:0] rword;    // {second, first} of the pair leaving

    // The pair written on odd step 2s+1 was completed on step 2s, so it goes
    // to the address one below the current pair count.
    assign waddr = (pair_cnt == '0) ? AW'(WORDS - 1) : pair_cnt - 1'b1;

    sp_ram #(.WORDS(WORDS), .WIDTH(2 * WIDTH)) u_ram (
      .clk  (clk),
      .en   (en),
      .we   (phase),
      .addr (phase ? waddr : pair_cnt),
      .wdata({second_q, first_q}),
      .rdata(rword)
    );

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        phase    <= 1'b0;
        pair_cnt <= '0;
        first_q  <= '0;
        second_q <= '0;
      end else if (en) begin
        phase <= ~phase;
        if (phase) begin
          first_q  <= din;
          pair_cnt <= (pair_cnt == AW'(WORDS - 1)) ? '0 : pair_cnt + 1'b1;
        end else begin
          second_q <= din;
        end
      end
    end

    // odd step: first sample of the word read on the step before;
    // even step: its second sample
    assign dout = phase ? rword[WIDTH-1:0] : rword[2*WIDTH-1:WIDTH];

  end else begin : g_reg
    logic [WIDTH-1:0] sr [DEPTH];

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        for (int i = 0; i < DEPTH; i++) sr[i] <= '0;
      end else if (en) begin
        sr[0] <= din;
        for (int i = 1; i < DEPTH; i++) sr[i] <= sr[i-1];
      end
    end

    assign dout = sr[DEPTH-1];
  end

endmodule
