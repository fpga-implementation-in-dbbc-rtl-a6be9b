// tb_hilbert_filter: self-checking test of the 90-degree Hilbert filter.
//
// Random samples enter on clocks with en_i high, with random idle clocks
// in between.  The testbench computes the plain
// convolution y[n] = round(sum_m h[m] * x[n-m] / 2^15) from its own copy of
// the 31 taps, without using their symmetry, and expects it one clock after
// x[n] is applied.
// A cosine at a quarter of the sample rate must come out as a sine of the
// same amplitude (within 2 percent of the 0.997 design gain), delayed by the 15-sample group delay
// and the output register.
module tb_hilbert_filter;
  localparam int TAPS = 31;
  localparam int N = 600;
  localparam int H [TAPS] = '{
    -111, 0, -192, 0, -440, 0, -922, 0, -1753, 0, -3213, 0, -6343, 0, -20651, 0,
    20651, 0, 6343, 0, 3213, 0, 1753, 0, 922, 0, 440, 0, 192, 0, 111};

  logic clk = 0, rst_n = 0, en_i = 0;
  logic signed [15:0] x_i, y_o;
  int x [N];
  int checks = 0, failures = 0;

  hilbert_filter dut (.clk, .rst_n, .en_i, .x_i, .y_o);

  always #5 clk = ~clk;

  // Idle clocks between samples: en_i low, garbage on the input, the output
  // must hold.
  int n_idle = 0;
  task automatic idle_cycles();
    logic signed [15:0] hold;
    hold = y_o;
    en_i = 0;
    repeat ($urandom_range(2, 1)) begin
      x_i = 16'($urandom);
      @(posedge clk);
      #1;
      checks++;
      n_idle++;
      if (y_o !== hold) begin
        failures++;
        if (failures < 10) $display("output moved while en_i was low");
      end
    end
  endtask

  function automatic int reference(input int n);
    longint acc = 0;
    for (int m = 0; m < TAPS; m++)
      if (n - m >= 0) acc += longint'(H[m]) * longint'(x[n-m]);
    acc = (acc + 16384) >>> 15;
    if (acc > 32767) acc = 32767;
    if (acc < -32768) acc = -32768;
    return int'(acc);
  endfunction

  initial begin
    for (int i = 0; i < N; i++) begin
      if (i < 200)      x[i] = $urandom_range(30000, 0) - 15000;
      else if (i < 400) x[i] = (i % 4 == 0) ? 10000 : (i % 4 == 2) ? -10000 : 0; // cosine, f = 1/4
      else              x[i] = 10000;                                           // constant
    end
    x_i = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int n = 0; n < N; n++) begin
      if ($urandom_range(2, 0) == 0) idle_cycles();
      en_i = 1;
      x_i = 16'(x[n]);
      @(posedge clk);
      #1;
      checks++;
      if (int'(y_o) != reference(n)) begin
        failures++;
        if (failures < 10) $display("n=%0d: got %0d expected %0d", n, y_o, reference(n));
      end
      if (n >= 300 && n < 400) begin
        checks++;
        // Hilbert of cos(pi/2 * n) is sin(pi/2 * n); delay 15 samples
        if (((n - 15) % 4 == 1 && (y_o < 9800 || y_o > 10100)) ||
            ((n - 15) % 4 == 3 && (y_o > -9800 || y_o < -10100)) ||
            ((n - 15) % 4 == 0 && (y_o > 2 || y_o < -2))) begin
          failures++;
          if (failures < 10) $display("quadrature n=%0d: got %0d", n, y_o);
        end
      end
      if (n == N - 1) begin
        checks++;
        if (y_o > 50 || y_o < -50) begin failures++; $display("DC out: %0d", y_o); end
      end
    end
    checks++;
    if (n_idle == 0) failures++;
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
