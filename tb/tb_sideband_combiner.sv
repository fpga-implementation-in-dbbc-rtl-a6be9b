// tb_sideband_combiner: self-checking test of the LSB/USB combiner.
//
// Random pairs, with full-scale values to force saturation, are applied
// with a random sideband selection and a random enable; one clock later the
// output must be the saturated sum (LSB) or difference (USB), or unchanged
// when the enable was low.
module tb_sideband_combiner;
  import dbbc_pkg::*;

  logic clk = 0, rst_n = 0, en = 0;
  int n_idle = 0;
  sideband_e sb;
  logic signed [15:0] u, h, y;
  int exp_y;
  int checks = 0, failures = 0, n_lsb = 0, n_usb = 0, n_sat = 0;

  sideband_combiner #(.W(16)) dut (.clk, .rst_n, .en_i(en), .sideband_i(sb), .upper_i(u), .shifted_i(h), .y_o(y));

  always #5 clk = ~clk;

  initial begin
    sb = SB_LSB; u = '0; h = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int n = 0; n < 1000; n++) begin
      @(negedge clk);
      sb = sideband_e'($urandom_range(1, 0));
      u = (n % 7 == 0) ? 16'sh7ff0 : 16'($urandom);
      h = (n % 11 == 0) ? 16'sh8005 : 16'($urandom);
      exp_y = (sb == SB_LSB) ? int'(u) + int'(h) : int'(u) - int'(h);
      en = ($urandom_range(4, 0) != 0);
      if (!en) begin
        exp_y = int'(y);
        n_idle++;
      end else if (exp_y > 32767)  begin exp_y = 32767;  n_sat++; end
      if (exp_y < -32768) begin exp_y = -32768; n_sat++; end
      if (en && sb == SB_LSB) n_lsb++;
      else if (en) n_usb++;
      @(posedge clk);
      #1;
      checks++;
      if (int'(y) != exp_y) begin
        failures++;
        if (failures < 10) $display("n=%0d sb=%0d u=%0d h=%0d: got %0d expected %0d", n, sb, u, h, y, exp_y);
      end
    end
    checks++;
    if (n_lsb == 0 || n_usb == 0 || n_sat == 0 || n_idle == 0) failures++;
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
