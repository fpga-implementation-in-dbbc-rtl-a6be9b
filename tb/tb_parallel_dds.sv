// tb_parallel_dds: self-checking test of the parallel DDS.
//
// A reference phase accumulator in the testbench advances by M*ftw per
// clock (the phase increment F_cir of one clock) and gives branch k the
// extra phase k*ftw (the initial phase difference of one sample).  Each
// branch's sine and cosine are compared with 127*sin(2*pi*(p+0.5)/1024) and
// the cosine, computed with real arithmetic, p being the top 10 bits of the
// reference phase; a difference of 1 LSB is accepted.  The tuning word is
// changed twice during the run.
module tb_parallel_dds;
  localparam int M = 4;
  localparam int PW = 32;

  logic clk = 0, rst_n = 0;
  logic [PW-1:0] ftw;
  logic signed [7:0] sin_o [M];
  logic signed [7:0] cos_o [M];
  logic [PW-1:0] ref_acc, base;
  int checks = 0, failures = 0;
  int cycles = 0;

  parallel_dds #(.M(M), .PHASE_W(PW)) dut (.clk, .rst_n, .ftw, .sin_o, .cos_o);

  always #5 clk = ~clk;

  function automatic int expected(input logic [PW-1:0] ph, input bit cosine);
    real a;
    int p;
    p = int'(ph >> (PW - 10));
    if (cosine) p = (p + 256) % 1024;
    a = 127.0 * $sin(2.0 * 3.14159265358979 * (real'(p) + 0.5) / 1024.0);
    return $rtoi(a >= 0 ? a + 0.5 : a - 0.5);
  endfunction

  task automatic check_lane(input int k, input logic [PW-1:0] ph);
    int es, ec;
    es = expected(ph, 0);
    ec = expected(ph, 1);
    checks += 2;
    if (int'(sin_o[k]) - es > 1 || es - int'(sin_o[k]) > 1) begin
      failures++;
      if (failures < 10) $display("sin lane %0d: got %0d expected %0d", k, sin_o[k], es);
    end
    if (int'(cos_o[k]) - ec > 1 || ec - int'(cos_o[k]) > 1) begin
      failures++;
      if (failures < 10) $display("cos lane %0d: got %0d expected %0d", k, cos_o[k], ec);
    end
  endtask

  initial begin
    ftw = 32'h0123_4567;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    ref_acc = '0;
    for (int n = 0; n < 600; n++) begin
      if (n == 200) ftw = 32'h3A00_0001;
      if (n == 400) ftw = $urandom;
      @(posedge clk);
      base = ref_acc;
      ref_acc = ref_acc + PW'(M) * ftw;
      #1;
      for (int k = 0; k < M; k++) check_lane(k, base + PW'(k) * ftw);
      cycles++;
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
