// tb_polyphase_decimator: self-checking test of the poly-phase decimator.
//
// Four random samples per clock enter the filter.  The testbench keeps the
// whole serial sample stream and computes the decimated direct-form output
//     y[n] = round(sum_j h[j] * s[4n+3-j] / 2^15)
// from its own copy of the 32 taps (a Hamming-windowed sinc, cut-off 0.1 of
// the sample rate).  The filter must produce this one clock after the lanes
// arrive, one output per clock.  A final run with a constant input checks
// the unity DC gain.
module tb_polyphase_decimator;
  localparam int M = 4;
  localparam int TAPS = 32;
  localparam int N = 400;

  localparam int H [TAPS] = '{
    -17, 20, 73, 135, 164, 91, -129, -466, -783, -850, -435, 588, 2141, 3927, 5501, 6424,
    6424, 5501, 3927, 2141, 588, -435, -850, -783, -466, -129, 91, 164, 135, 73, 20, -17};

  logic clk = 0, rst_n = 0;
  logic signed [15:0] x_i [M];
  logic signed [15:0] y_o;
  int stream [M*N];
  int checks = 0, failures = 0;

  polyphase_decimator #(.M(M)) dut (.clk, .rst_n, .x_i, .y_o);

  always #5 clk = ~clk;

  function automatic int reference(input int n);
    longint acc = 0;
    for (int j = 0; j < TAPS; j++)
      if (M*n + M-1 - j >= 0) acc += longint'(H[j]) * longint'(stream[M*n + M-1 - j]);
    acc = (acc + 16384) >>> 15;
    if (acc > 32767) acc = 32767;
    if (acc < -32768) acc = -32768;
    return int'(acc);
  endfunction

  initial begin
    for (int i = 0; i < M*N; i++)
      stream[i] = (i >= M*(N-40)) ? 10000 : $urandom_range(40000, 0) - 20000;
    for (int k = 0; k < M; k++) x_i[k] = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int n = 0; n < N; n++) begin
      for (int k = 0; k < M; k++) x_i[k] = 16'(stream[M*n + k]);
      @(posedge clk);
      #1;
      checks++;
      if (int'(y_o) != reference(n)) begin
        failures++;
        if (failures < 10) $display("n=%0d: got %0d expected %0d", n, y_o, reference(n));
      end
    end
    // DC gain of one: a constant 10000 must come out as 10000 (+/-2)
    checks++;
    if (int'(y_o) > 10002 || int'(y_o) < 9998) begin
      failures++;
      $display("DC gain: got %0d", y_o);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
