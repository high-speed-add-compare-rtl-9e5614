// Continuous-stream test of viterbi_decoder at its default size.
//
// After a single reset, 5000 random information bits are encoded (generators octal 23
// and 35) and sent as clean soft symbols, one per clock, with no further reset. Checks:
//  - one decoded bit per clock, each equal to the bit sent DEPTH-1 clocks earlier;
//  - on a clean channel the true state's metric stays 0 for the whole stream, while
//    all other states sit at a positive metric, so saturation never corrupts decoding;
//  - the decoder's output count equals the number of clocks after the fill latency.
module tb_viterbi_stream;
  import viterbi_pkg::*;
  localparam int DEPTH = 25;
  localparam int N     = 5000;

  int checks = 0, failures = 0;
  logic clk = 0, rb = 0;
  soft_t r0, r1;
  logic decoded;
  logic [N_STATES-1:0] ps;
  sm_t sm [N_STATES];
  logic u [N];
  logic [3:0] st;
  int outputs = 0;

  viterbi_decoder dut (.clk(clk), .rb(rb), .r0(r0), .r1(r1), .decoded(decoded), .ps(ps), .sm(sm));

  always #5 clk = ~clk;

  initial begin : watchdog
    #((N + 10) * 10);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    r0 = '0; r1 = '0; st = '0;
    for (int t = 0; t < N; t++) u[t] = 1'($urandom);
    @(negedge clk); rb = 1;
    for (int t = 0; t < N; t++) begin
      r0 = (u[t] ^ st[2] ^ st[3]) ? 4'd15 : 4'd0;
      r1 = (u[t] ^ st[0] ^ st[1] ^ st[3]) ? 4'd15 : 4'd0;
      st = {st[2:0], u[t]};
      @(posedge clk); #1;
      checks++;
      if (sm[st] != 0) begin
        failures++;
        if (failures < 10) $display("FAIL t=%0d true-state metric %0d", t, sm[st]);
      end
      if (t >= 4) begin
        for (int j = 0; j < N_STATES; j++) if (j != int'(st) && sm[j] == 0) begin
          failures++;
          if (failures < 10) $display("FAIL t=%0d state %0d shares metric 0", t, j);
        end
      end
      if (t >= DEPTH - 1) begin
        outputs++;
        checks++;
        if (decoded !== u[t - DEPTH + 1]) begin
          failures++;
          if (failures < 10) $display("FAIL bit %0d decoded=%0b sent=%0b", t - DEPTH + 1, decoded, u[t - DEPTH + 1]);
        end
      end
      @(negedge clk);
    end
    checks++;
    if (outputs != N - DEPTH + 1) failures++;
    $display("decoded %0d bits in %0d clocks", outputs, N);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
