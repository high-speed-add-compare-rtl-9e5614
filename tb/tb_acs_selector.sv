// Self-checking test of acs_selector with random metrics and both PS values.
module tb_acs_selector;
  int checks = 0, failures = 0;
  logic [7:0] su, sl, nsm;
  logic ps;

  acs_selector #(.W(8)) dut (.su(su), .sl(sl), .ps(ps), .nsm(nsm));

  initial begin : watchdog
    #100_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 2000; n++) begin
      su = 8'($urandom); sl = 8'($urandom); ps = 1'(n);
      #1;
      checks++;
      if (nsm != (ps ? sl : su)) begin
        failures++;
        if (failures < 10) $display("FAIL su=%0d sl=%0d ps=%0b nsm=%0d", su, sl, ps, nsm);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
