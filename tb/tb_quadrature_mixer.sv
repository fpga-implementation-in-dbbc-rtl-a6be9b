// tb_quadrature_mixer: self-checking test of the quadrature mixer.
//
// Random samples and random local-oscillator values, including the extreme
// values, are applied to all lanes; one clock later each lane must hold the
// exact products x*sin (upper) and x*cos (lower).
module tb_quadrature_mixer;
  localparam int M = 4;

  logic clk = 0;
  logic signed [7:0]  x_i [M], sin_i [M], cos_i [M];
  logic signed [15:0] upper_o [M], lower_o [M];
  int exp_u [M], exp_l [M];
  int checks = 0, failures = 0;

  quadrature_mixer #(.M(M)) dut (.clk, .x_i, .sin_i, .cos_i, .upper_o, .lower_o);

  always #5 clk = ~clk;

  initial begin
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      for (int k = 0; k < M; k++) begin
        x_i[k]   = (n < 4) ? -8'sd128 : 8'($urandom);
        sin_i[k] = (n < 2) ? -8'sd128 : 8'($urandom);
        cos_i[k] = (n < 2) ? 8'sd127  : 8'($urandom);
        exp_u[k] = int'(x_i[k]) * int'(sin_i[k]);
        exp_l[k] = int'(x_i[k]) * int'(cos_i[k]);
      end
      @(posedge clk);
      #1;
      for (int k = 0; k < M; k++) begin
        checks += 2;
        if (int'(upper_o[k]) != exp_u[k]) begin
          failures++;
          if (failures < 10) $display("upper lane %0d: got %0d expected %0d", k, upper_o[k], exp_u[k]);
        end
        if (int'(lower_o[k]) != exp_l[k]) begin
          failures++;
          if (failures < 10) $display("lower lane %0d: got %0d expected %0d", k, lower_o[k], exp_l[k]);
        end
      end
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
