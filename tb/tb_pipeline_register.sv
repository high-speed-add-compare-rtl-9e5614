// Self-checking test of pipeline_register: after the asynchronous reset state 0 holds 0
// and states 1..15 hold 255; afterwards every rising edge loads all 16 metrics.
module tb_pipeline_register;
  import viterbi_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rb = 1;
  sm_t nsm [N_STATES];
  sm_t sm  [N_STATES];
  sm_t last [N_STATES];

  pipeline_register dut (.clk(clk), .rb(rb), .nsm(nsm), .sm(sm));

  always #5 clk = ~clk;

  initial begin : watchdog
    #100_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_all(input string what);
    for (int j = 0; j < N_STATES; j++) begin
      checks++;
      if (sm[j] != last[j]) begin
        failures++;
        if (failures < 10) $display("FAIL %s state %0d sm=%0d exp=%0d", what, j, sm[j], last[j]);
      end
    end
  endtask

  initial begin
    for (int j = 0; j < N_STATES; j++) nsm[j] = sm_t'(j + 1);
    @(posedge clk); #1;
    rb = 0; #1;
    for (int j = 0; j < N_STATES; j++) last[j] = (j == 0) ? 8'd0 : 8'd255;
    check_all("reset");
    @(posedge clk); #1;
    check_all("held in reset");
    rb = 1;
    for (int n = 0; n < 100; n++) begin
      for (int j = 0; j < N_STATES; j++) nsm[j] = sm_t'($urandom);
      for (int j = 0; j < N_STATES; j++) last[j] = nsm[j];
      @(posedge clk); #1;
      check_all("load");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
