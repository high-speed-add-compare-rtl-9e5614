// Self-checking test of dff_ar: asynchronous active-low reset to 0 (also between clock
// edges), then capture of random data on each rising edge.
module tb_dff_ar;
  int checks = 0, failures = 0;
  logic clk = 0, rb = 1;
  logic [7:0] d, q, d_prev;

  dff_ar #(.W(8)) dut (.clk(clk), .rb(rb), .d(d), .q(q));

  always #5 clk = ~clk;

  initial begin : watchdog
    #100_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [7:0] e, input string what);
    checks++;
    if (q !== e) begin
      failures++;
      $display("FAIL %s q=%0h exp=%0h", what, q, e);
    end
  endtask

  initial begin
    d = 8'hA5;
    @(posedge clk); #1;
    check(8'hA5, "capture");
    #1 rb = 0; #1;                 // asynchronous: no clock edge in between
    check(8'h00, "async reset");
    @(posedge clk); #1;
    check(8'h00, "held in reset");
    rb = 1;
    for (int n = 0; n < 200; n++) begin
      d = 8'($urandom); d_prev = d;
      @(posedge clk); #1;
      d = 8'($urandom);            // change after the edge must not show
      #2;
      check(d_prev, "capture");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
