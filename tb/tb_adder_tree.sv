// tb_adder_tree -- self-checking test of adder_tree.
//
// Drives a new random vector every clock into a 17-input and a 129-input
// tree (4 terms per stage, so 3 and 4 stages) and compares each sum, the
// stated number of clocks later, with a sum computed here.
module tb_adder_tree;
  localparam int N1 = 17, N2 = 129, IW = 16;
  localparam int L1 = 3, L2 = 4;
  localparam int OW1 = IW + $clog2(N1), OW2 = IW + $clog2(N2);

  logic clk = 0;
  always #5 clk = ~clk;

  logic signed [IW-1:0]  x1 [N1];
  logic signed [IW-1:0]  x2 [N2];
  logic signed [OW1-1:0] s1;
  logic signed [OW2-1:0] s2;
  int checks = 0, failures = 0;
  longint exp1 [$], exp2 [$];

  adder_tree #(.N(N1), .IW(IW)) dut1 (.clk, .x(x1), .sum(s1));
  adder_tree #(.N(N2), .IW(IW)) dut2 (.clk, .x(x2), .sum(s2));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int cyc = 0; cyc < 200; cyc++) begin
      longint a, b;
      a = 0; b = 0;
      for (int i = 0; i < N1; i++) begin
        x1[i] = (cyc % 50 == 7) ? -16'sd32768 : IW'($urandom);
        a += x1[i];
      end
      for (int i = 0; i < N2; i++) begin
        x2[i] = (cyc % 50 == 9) ? 16'sd32767 : IW'($urandom);
        b += x2[i];
      end
      exp1.push_back(a);
      exp2.push_back(b);
      @(posedge clk);
      #1;
      if (exp1.size() > L1) void'(exp1.pop_front());
      if (exp2.size() > L2) void'(exp2.pop_front());
      if (exp1.size() == L1) begin
        checks++;
        if (longint'(s1) != exp1[0]) begin
          failures++;
          $display("N=%0d cyc %0d: got %0d want %0d", N1, cyc, s1, exp1[0]);
        end
      end
      if (exp2.size() == L2) begin
        checks++;
        if (longint'(s2) != exp2[0]) begin
          failures++;
          $display("N=%0d cyc %0d: got %0d want %0d", N2, cyc, s2, exp2[0]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
