// tb_hfp_fft: end-to-end self-checking testbench of the pipelined hybrid
// floating point FFT (hfp_fft), run at 128 points.
//
// Streams FRAMES frames into the FFT: random complex samples at full scale,
// 1/8 and 1/64 of it, then a complex tone between two bins at half scale,
// with random stall clocks (in_valid low) in between. Every output sample is converted
// to a real number (mantissa * 2**exponent) and compared with a
// double-precision DFT of the same quantized input frame, computed here
// independently of the design. Checks:
//  - the first valid output comes exactly at the expected pipeline latency,
//    N-1 delay steps + 1 per butterfly + 2 per MUL + 1 (output normalizer);
//  - out_index counts 0..N-1 and out_k is its bit reversal;
//  - every output bin is within 6 % of the frame's RMS bin magnitude plus
//    2 % of its own magnitude;
//  - every frame reaches an SNR of at least SNR_MIN dB;
//  - the SNR of the smallest-amplitude frame is within 6 dB of that of the
//    full-scale frame (scaling keeps the SNR independent of signal level).
// Mechanisms counted (each must occur): stall clocks, output exponent
// differing between frames of different amplitude, output exponent varying
// inside one frame, negative output exponents (small signals normalized up).
module tb_hfp_fft;
  import hfp_pkg::*;

  localparam int unsigned LOG2N  = 7;
  localparam int unsigned N      = 2 ** LOG2N;
  localparam int unsigned MANT_W = MANT_W_DEF;
  localparam int unsigned EXP_W  = EXP_W_DEF;
  localparam int unsigned FRAMES = 4;
  localparam real         SNR_MIN = 42.0;
  localparam real         PI = 3.14159265358979323846;
  localparam int unsigned NBUT = LOG2N;                     // butterflies
  localparam int unsigned NMUL = (LOG2N % 2) + LOG2N / 2 - 1;
  localparam int unsigned EXP_LAT = (N - 1) + NBUT + 2 * NMUL + 1;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic in_valid = 1'b0;
  logic signed [MANT_W-1:0] in_re = '0, in_im = '0;
  logic out_valid;
  logic signed [MANT_W-1:0] out_re, out_im;
  logic signed [EXP_W-1:0]  out_exp;
  logic [LOG2N-1:0] out_index, out_k;

  always #5 clk = ~clk;

  hfp_fft #(.LOG2N(LOG2N)) u_dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_re(in_re), .in_im(in_im),
    .out_valid(out_valid), .out_re(out_re), .out_im(out_im), .out_exp(out_exp),
    .out_index(out_index), .out_k(out_k)
  );

  int checks = 0, failures = 0;
  int n_stall = 0, n_exp_frame_diff = 0, n_exp_var = 0, n_exp_neg = 0;

  // input frames (two extra frames push the last results out)
  int  xr [FRAMES+2][N];
  int  xi [FRAMES+2][N];
  int  amp [FRAMES+2];
  real cos_t [N];
  real sin_t [N];

  task automatic fail(input string msg);
    failures++;
    if (failures < 20) $display("FAIL: %s", msg);
  endtask

  // reference DFT bin k of frame f
  function automatic void dft(input int f, input int k, output real yr, output real yi);
    yr = 0.0; yi = 0.0;
    for (int n = 0; n < N; n++) begin
      int p = (n * k) % N;
      // x * exp(-j 2 pi p / N)
      yr += xr[f][n] * cos_t[p] + xi[f][n] * sin_t[p];
      yi += xi[f][n] * cos_t[p] - xr[f][n] * sin_t[p];
    end
  endfunction

  initial begin
    for (int p = 0; p < N; p++) begin
      cos_t[p] = $cos(2.0 * PI * p / N);
      sin_t[p] = $sin(2.0 * PI * p / N);
    end
    for (int f = 0; f <= FRAMES + 1; f++) begin
      case (f % 4)
        0: amp[f] = 2 ** (MANT_W - 1) - 1;
        1: amp[f] = 2 ** (MANT_W - 4);
        2: amp[f] = 2 ** (MANT_W - 7);
        default: amp[f] = 2 ** (MANT_W - 2);
      endcase
      for (int n = 0; n < N; n++) begin
        if (f % 4 == 3) begin  // a tone between two bins
          xr[f][n] = int'($floor(amp[f] * $cos(2.0 * PI * 5.3 * n / N) + 0.5));
          xi[f][n] = int'($floor(amp[f] * $sin(2.0 * PI * 5.3 * n / N) + 0.5));
        end else begin
          xr[f][n] = int'($urandom_range(2 * amp[f])) - amp[f];
          xi[f][n] = int'($urandom_range(2 * amp[f])) - amp[f];
        end
      end
    end
  end

  // watchdog
  initial begin
    repeat ((FRAMES + 3) * N * 2 + 1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // stimulus
  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int f = 0; f <= FRAMES + 1; f++) begin
      for (int n = 0; n < N; n++) begin
        while ($urandom_range(99) < 15) begin
          in_valid <= 1'b0;
          in_re <= MANT_W'($urandom);
          in_im <= MANT_W'($urandom);
          n_stall++;
          @(posedge clk);
        end
        in_valid <= 1'b1;
        in_re <= MANT_W'(xr[f][n]);
        in_im <= MANT_W'(xi[f][n]);
        @(posedge clk);
      end
    end
    in_valid <= 1'b0;
  end

  // result collection and checking
  real yr_q [FRAMES][N];
  real yi_q [FRAMES][N];
  int  emin [FRAMES], emax [FRAMES];

  initial begin
    int steps, f, i;
    real snr [FRAMES];
    steps = 0;
    i = 0;
    @(posedge rst_n);
    // latency: count enabled steps until the first valid output
    while (1) begin
      @(negedge clk);
      if (in_valid && out_valid) break;
      if (in_valid) steps++;
    end
    checks++;
    if (steps != EXP_LAT) fail($sformatf("latency %0d steps, expected %0d", steps, EXP_LAT));
    while (i < FRAMES * N) begin
      if (in_valid && out_valid) begin
        int k;
        f = i / N;
        k = i % N;
        if (out_index != LOG2N'(k) || out_k != LOG2N'(bitrev(k, LOG2N))) begin
          checks++;
          fail($sformatf("output %0d: index %0d k %0d", i, out_index, out_k));
        end
        yr_q[f][out_k] = real'(out_re) * (2.0 ** real'(out_exp));
        yi_q[f][out_k] = real'(out_im) * (2.0 ** real'(out_exp));
        if (k == 0 || int'(out_exp) < emin[f]) emin[f] = int'(out_exp);
        if (k == 0 || int'(out_exp) > emax[f]) emax[f] = int'(out_exp);
        if (out_exp < 0) n_exp_neg++;
        i++;
      end
      @(negedge clk);
    end
    checks++;
    // compare every frame with the reference
    for (int fr = 0; fr < FRAMES; fr++) begin
      real ps, pe, rms, worst;
      real xr_ref [N];
      real xi_ref [N];
      int wk;
      wk = 0;
      ps = 0.0; pe = 0.0; worst = 0.0;
      for (int k = 0; k < N; k++) begin
        dft(fr, k, xr_ref[k], xi_ref[k]);
        ps += xr_ref[k] * xr_ref[k] + xi_ref[k] * xi_ref[k];
      end
      rms = $sqrt(ps / N);
      for (int k = 0; k < N; k++) begin
        real er, ei, ratio;
        er = yr_q[fr][k] - xr_ref[k];
        ei = yi_q[fr][k] - xi_ref[k];
        pe += er * er + ei * ei;
        // allowed error: 6 % of the frame's RMS bin plus 2 % of the bin's own
        // magnitude (each output has its own exponent)
        ratio = $sqrt(er * er + ei * ei) /
                (0.06 * rms + 0.02 * $sqrt(xr_ref[k] * xr_ref[k] + xi_ref[k] * xi_ref[k]));
        if (ratio > worst) begin
          worst = ratio;
          wk = k;
        end
      end
      snr[fr] = 10.0 * $log10(ps / (pe + 1e-30));
      $display("frame %0d amplitude %0d: SNR %0.1f dB, worst bin (bin %0d) at %0.0f %% of its tolerance, exponents %0d..%0d",
               fr, amp[fr], snr[fr], wk, 100.0 * worst, emin[fr], emax[fr]);
      checks++;
      if (snr[fr] < SNR_MIN) fail($sformatf("frame %0d SNR %0.1f dB", fr, snr[fr]));
      checks++;
      if (worst > 1.0) fail($sformatf("frame %0d worst bin error too large", fr));
      if (emax[fr] != emin[fr]) n_exp_var++;
      if (fr > 0 && amp[fr] != amp[fr-1] && emax[fr] != emax[fr-1]) n_exp_frame_diff++;
    end
    checks++;
    if (FRAMES >= 3 && (snr[2] < snr[0] - 6.0 || snr[2] > snr[0] + 6.0))
      fail($sformatf("SNR depends on amplitude: %0.1f vs %0.1f dB", snr[0], snr[2]));
    $display("mechanisms: stall clocks %0d, exponent change between frames %0d, exponent variation in frame %0d, negative exponents %0d",
             n_stall, n_exp_frame_diff, n_exp_var, n_exp_neg);
    checks++;
    if (n_stall == 0) fail("no stall happened");
    checks++;
    if (n_exp_frame_diff == 0) fail("output exponent never followed the amplitude");
    checks++;
    if (n_exp_var == 0) fail("output exponent never varied inside a frame");
    checks++;
    if (n_exp_neg == 0) fail("no small signal was normalized up");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
