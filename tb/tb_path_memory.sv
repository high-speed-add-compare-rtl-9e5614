// Self-checking test of path_memory. Random decision vectors are applied, one per clock,
// and recorded. The expected output is found by tracing back through that record: start
// at state 0, step DEPTH-1 times to the predecessor {PS[s], s[3:1]}, and read the input
// bit (bit 0) of the state reached. Before DEPTH steps have been taken the trace runs
// into the reset value 0.
module tb_path_memory;
  import viterbi_pkg::*;
  localparam int DEPTH = 25;
  localparam int STEPS = 400;
  int checks = 0, failures = 0;
  logic clk = 0, rb = 0;
  logic [N_STATES-1:0] ps;
  logic decoded;
  logic [N_STATES-1:0] hist [STEPS];
  logic [3:0] s;
  logic exp_bit;
  int n_one = 0;

  path_memory #(.DEPTH(DEPTH)) dut (.clk(clk), .rb(rb), .ps(ps), .decoded(decoded));

  always #5 clk = ~clk;

  initial begin : watchdog
    #100_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ps = '0;
    #12 rb = 1;
    for (int t = 0; t < STEPS; t++) begin
      ps = N_STATES'($urandom);
      hist[t] = ps;
      @(posedge clk); #1;
      // Steps t, t-1, .., t-DEPTH+1 are in the memory; trace back from state 0.
      s = 4'd0;
      for (int k = t; k > t - DEPTH + 1; k--) begin
        if (k < 0) break;
        s = {hist[k][s], s[3:1]};
      end
      exp_bit = (t - DEPTH + 1 < 0) ? 1'b0 : s[0];
      if (exp_bit) n_one++;
      checks++;
      if (decoded !== exp_bit) begin
        failures++;
        if (failures < 10) $display("FAIL t=%0d decoded=%0b exp=%0b", t, decoded, exp_bit);
      end
    end
    checks++;
    if (n_one == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
