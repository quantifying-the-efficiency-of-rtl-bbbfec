// tb_softmax_layer -- self-checking test of softmax_layer (10 inputs).
// Random score vectors (narrow and wide spreads, ties, extreme values)
// every clock with gaps; each result is compared with the table-method
// reference, and the latency must be 6 clocks.
module tb_softmax_layer;
  import tb_ref_pkg::*;
  localparam int N = 10, LAT = 6;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  always #5 clk = ~clk;
  logic signed [W-1:0] x [N];
  logic signed [W-1:0] y [N];
  int checks = 0, failures = 0, cyc = 0;
  typedef longint vec_t [];
  vec_t expq [$];
  int   sent_at [$];

  softmax_layer #(.N(N), .W(W), .F(F)) dut (.clk, .rst_n, .in_valid, .x, .out_valid, .y);

  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) if (rst_n && out_valid) begin
    vec_t e;
    checks++;
    if (expq.size() == 0) failures++;
    else begin
      e = expq.pop_front();
      if (cyc - sent_at.pop_front() != LAT) begin failures++; $display("latency"); end
      for (int j = 0; j < N; j++) begin
        checks++;
        if (longint'(y[j]) != e[j]) begin
          failures++; $display("y[%0d] got %0d want %0d", j, y[j], e[j]);
        end
      end
    end
  end

  initial begin
    vec_t v;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      in_valid = (n % 9 != 4);
      v = new[N];
      for (int i = 0; i < N; i++) begin
        case (n % 4)
          0: x[i] = W'($urandom_range(0, 511) - 256);
          1: x[i] = W'($urandom);
          2: x[i] = 16'sd100;
          default: x[i] = (i == 3) ? 16'sd32767 : -16'sd32768;
        endcase
        v[i] = x[i];
      end
      if (in_valid) begin
        expq.push_back(softmax_ref(v));
        sent_at.push_back(cyc);
      end
    end
    @(negedge clk) in_valid = 0;
    repeat (20) @(posedge clk);
    checks++;
    if (expq.size() != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
