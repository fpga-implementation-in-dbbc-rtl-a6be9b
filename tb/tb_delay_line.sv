// tb_delay_line: self-checking test of the matching delay.
//
// Random data enter on clocks with en_i high, with random idle clocks in
// between; the output must equal the input of exactly DEPTH strobes
// earlier (zero before that) and must not move on idle clocks.
module tb_delay_line;
  localparam int DEPTH = 16;

  logic clk = 0, rst_n = 0, en_i = 0;
  int n_idle = 0;
  logic signed [15:0] hold;
  logic signed [15:0] d_i, d_o;
  logic signed [15:0] sent [1000];
  int checks = 0, failures = 0;

  delay_line #(.W(16), .DEPTH(DEPTH)) dut (.clk, .rst_n, .en_i, .d_i, .d_o);

  always #5 clk = ~clk;

  initial begin
    d_i = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int n = 0; n < 1000; n++) begin
      if ($urandom_range(3, 0) == 0) begin
        // idle clock: nothing may shift
        hold = d_o;
        en_i = 0;
        d_i = 16'($urandom);
        @(posedge clk);
        #1;
        checks++;
        n_idle++;
        if (d_o !== hold) failures++;
      end
      en_i = 1;
      sent[n] = 16'($urandom);
      d_i = sent[n];
      @(posedge clk);
      #1;
      checks++;
      if (d_o !== ((n >= DEPTH - 1) ? sent[n-DEPTH+1] : 16'sd0)) begin
        failures++;
        if (failures < 10) $display("cycle %0d: got %0d", n, d_o);
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
