// tb_dsp_mult -- self-checking test of dsp_mult.
//
// Random signed operands every clock with ce high, then a stretch with ce
// low in which the output must hold; the full product must appear three
// enabled clocks after its operands.
module tb_dsp_mult;
  logic clk = 0;
  always #5 clk = ~clk;
  logic ce;
  logic signed [15:0] a, b;
  logic signed [31:0] p;
  int checks = 0, failures = 0;

  dsp_mult #(.A_W(16), .B_W(16)) dut (.clk, .ce, .a, .b, .p);

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint hist [$];
    longint held;
    ce = 1;
    for (int cyc = 0; cyc < 200; cyc++) begin
      a = 16'($urandom);
      b = (cyc % 20 == 3) ? -16'sd32768 : 16'($urandom);
      hist.push_back(longint'(a) * longint'(b));
      @(posedge clk);
      #1;
      if (hist.size() > 3) void'(hist.pop_front());
      if (hist.size() == 3) begin
        checks++;
        if (longint'(p) != hist[0]) begin
          failures++;
          $display("got %0d want %0d", p, hist[0]);
        end
      end
    end
    held = p;
    ce = 0;
    repeat (5) begin
      a = 16'($urandom);
      @(posedge clk);
      #1;
      checks++;
      if (longint'(p) != held) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
