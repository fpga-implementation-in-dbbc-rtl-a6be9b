// tb_halfband_decimator: self-checking test of one half-band decimate-by-2
// stage.
//
// Random samples arrive with a random strobe (about 60 percent of clocks).
// The testbench keeps the accepted samples a[j] and, after every second
// one (j = 1, 3, 5, ...), expects y = round(sum_m h[m] * a[j-m] / 2^15) with
// valid_o high on the next clock, from its own copy of the 19 taps.  y_o
// must hold between outputs, and exactly half of the accepted samples must
// produce an output (the rate).  A constant input checks the DC gain of one.
module tb_halfband_decimator;
  localparam int TAPS = 19;
  localparam int N = 2000;
  localparam int H [TAPS] = '{92, 0, -279, 0, 957, 0, -2670, 0, 10113, 16342,
                              10113, 0, -2670, 0, 957, 0, -279, 0, 92};

  logic clk = 0, rst_n = 0, valid_i = 0, valid_o;
  logic signed [15:0] x_i, y_o, hold;
  int a [N];
  int n_acc = 0, n_out = 0;
  int checks = 0, failures = 0;

  halfband_decimator dut (.clk, .rst_n, .valid_i, .x_i, .valid_o, .y_o);

  always #5 clk = ~clk;

  function automatic int reference(input int j);
    longint acc = 0;
    for (int m = 0; m < TAPS; m++)
      if (j - m >= 0) acc += longint'(H[m]) * longint'(a[j-m]);
    acc = (acc + 16384) >>> 15;
    if (acc > 32767) acc = 32767;
    if (acc < -32768) acc = -32768;
    return int'(acc);
  endfunction

  initial begin
    x_i = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int c = 0; c < 2*N && n_acc < N; c++) begin
      valid_i = ($urandom_range(9, 0) < 6);
      x_i = (n_acc >= N - 100) ? 16'sd10000 : 16'($urandom_range(30000, 0) - 15000);
      hold = y_o;
      if (valid_i) a[n_acc] = int'(x_i);
      @(posedge clk);
      #1;
      checks++;
      if (valid_i && (n_acc % 2 == 1)) begin
        n_out++;
        if (!valid_o || int'(y_o) != reference(n_acc)) begin
          failures++;
          if (failures < 10) $display("sample %0d: valid %0d got %0d expected %0d",
                                      n_acc, valid_o, y_o, reference(n_acc));
        end
      end else if (valid_o || y_o !== hold) begin
        failures++;
        if (failures < 10) $display("unexpected output change at accepted count %0d", n_acc);
      end
      if (valid_i) n_acc++;
    end
    valid_i = 0;
    // rate: one output per two accepted samples; DC gain one
    checks += 2;
    if (n_out != n_acc / 2) failures++;
    if (int'(y_o) < 9997 || int'(y_o) > 10003) begin
      failures++;
      $display("DC gain: got %0d", y_o);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
