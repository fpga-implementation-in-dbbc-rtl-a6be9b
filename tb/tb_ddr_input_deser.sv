// tb_ddr_input_deser: self-checking test of the two-bus DDR capture.
//
// A random sample stream is put on the A and P buses, two samples per clock
// edge (A/P before the rising edge: samples 4n, 4n+1; before the falling
// edge: 4n+2, 4n+3).  The processing clock rises 3/4 of a period after the
// sampler clock.  After each processing-clock edge all four lanes must hold
// the four samples of the previous sampler period in time order.
module tb_ddr_input_deser;
  localparam int W = 8;
  localparam int PERIODS = 200;

  logic clk_ddr, clk_proc;
  logic signed [W-1:0] a_bus, p_bus;
  logic signed [W-1:0] samples_o [4];
  logic signed [W-1:0] stream [4*PERIODS];
  int checks = 0, failures = 0;

  ddr_input_deser #(.W(W)) dut (.clk_ddr, .clk_proc, .a_bus, .p_bus, .samples_o);

  initial begin
    for (int i = 0; i < 4*PERIODS; i++) stream[i] = W'($urandom);
    clk_ddr = 0; clk_proc = 0; a_bus = '0; p_bus = '0;
    for (int n = 0; n < PERIODS; n++) begin
      // t = 8n: processing clock rises, capturing period n-1
      clk_proc = 1;
      #1 a_bus = stream[4*n]; p_bus = stream[4*n+1];
      if (n > 0) begin
        for (int k = 0; k < 4; k++) begin
          checks++;
          if (samples_o[k] !== stream[4*(n-1)+k]) begin
            failures++;
            if (failures < 10) $display("period %0d lane %0d: got %0d expected %0d",
                                        n-1, k, samples_o[k], stream[4*(n-1)+k]);
          end
        end
      end
      #1 clk_ddr = 1;                                   // t = 8n+2
      #1 a_bus = stream[4*n+2]; p_bus = stream[4*n+3];  // t = 8n+3
      #1 clk_proc = 0;                                  // t = 8n+4
      #2 clk_ddr = 0;                                   // t = 8n+6
      #2;                                               // t = 8n+8
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
