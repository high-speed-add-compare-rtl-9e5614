// Self-checking test of acs_comparator: all 256 x 256 metric pairs; PS must be 1
// exactly when SU > SL, including PS = 0 on equal metrics.
module tb_acs_comparator;
  int checks = 0, failures = 0;
  logic [7:0] su, sl;
  logic ps;

  acs_comparator #(.W(8)) dut (.su(su), .sln(~sl), .ps(ps));

  initial begin : watchdog
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) begin
      for (int j = 0; j < 256; j++) begin
        su = 8'(i); sl = 8'(j);
        #1;
        checks++;
        if (ps !== (i > j)) begin
          failures++;
          if (failures < 10) $display("FAIL su=%0d sl=%0d ps=%0b", su, sl, ps);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
