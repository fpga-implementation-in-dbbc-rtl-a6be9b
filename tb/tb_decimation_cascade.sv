// tb_decimation_cascade: self-checking test of the selectable half-band
// cascade.
//
// For every setting dec_sel = 0..3 the cascade is reset and fed one random
// sample per clock.  The testbench runs its own model of the chain of
// half-band stages (the 19 taps, decimation by two, rounding and
// saturation) and compares the sequence of samples marked by valid_o with
// the model's output of stage dec_sel.  It also checks the output rate
// (512 / 2^dec_sel strobes in 512 clocks, +/-1) and, for dec_sel = 0, the
// one-clock latency of the pass-through.
module tb_decimation_cascade;
  localparam int TAPS = 19;
  localparam int STAGES = 3;
  localparam int H [TAPS] = '{92, 0, -279, 0, 957, 0, -2670, 0, 10113, 16342,
                              10113, 0, -2670, 0, 957, 0, -279, 0, 92};

  logic clk = 0, rst_n = 0;
  logic [1:0] dec_sel;
  logic valid_i = 1, valid_o;
  logic signed [15:0] x_i, y_o;
  int checks = 0, failures = 0;

  // model state per stage
  int hist [STAGES][TAPS];
  bit odd [STAGES];
  int expq [$];

  decimation_cascade dut (.clk, .rst_n, .dec_sel, .valid_i, .x_i, .valid_o, .y_o);

  always #5 clk = ~clk;

  // Push one sample into model stage s; returns 1 and the output when the
  // stage produces one.
  function automatic bit stage_push(input int s, input int x, output int y);
    longint acc = 0;
    for (int i = TAPS-1; i > 0; i--) hist[s][i] = hist[s][i-1];
    hist[s][0] = x;
    odd[s] = !odd[s];
    if (odd[s]) return 0;   // first of a pair: no output
    for (int m = 0; m < TAPS; m++) acc += longint'(H[m]) * longint'(hist[s][m]);
    acc = (acc + 16384) >>> 15;
    if (acc > 32767) acc = 32767;
    if (acc < -32768) acc = -32768;
    y = int'(acc);
    return 1;
  endfunction

  function automatic void model(input int x, input int sel);
    int v = x, y;
    bit have = 1;
    for (int s = 0; s < sel && have; s++) begin
      have = stage_push(s, v, y);
      v = y;
    end
    if (have) expq.push_back(v);
  endfunction

  initial begin
    for (int sel = 0; sel <= STAGES; sel++) begin
      int n_valid;
      n_valid = 0;
      dec_sel = 2'(sel);
      rst_n = 0;
      x_i = '0;
      for (int s = 0; s < STAGES; s++) begin
        odd[s] = 0;
        for (int i = 0; i < TAPS; i++) hist[s][i] = 0;
      end
      expq.delete();
      repeat (2) @(posedge clk);
      #1 rst_n = 1;
      for (int c = 0; c < 512; c++) begin
        x_i = 16'($urandom_range(30000, 0) - 15000);
        model(int'(x_i), sel);
        @(posedge clk);
        #1;
        if (valid_o) begin
          n_valid++;
          checks++;
          if (expq.size() == 0 || int'(y_o) != expq[0]) begin
            failures++;
            if (failures < 10) $display("sel %0d: got %0d expected %0d", sel, y_o,
                                        expq.size() ? expq[0] : 0);
          end
          if (expq.size()) void'(expq.pop_front());
          if (sel == 0) begin
            checks++;
            if (int'(y_o) != int'(x_i)) failures++;   // registered on this clock
          end
        end
      end
      checks++;
      if (n_valid < 512 / (1 << sel) - 1 - sel || n_valid > 512 / (1 << sel)) begin
        failures++;
        $display("sel %0d: %0d output strobes in 512 clocks", sel, n_valid);
      end
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
