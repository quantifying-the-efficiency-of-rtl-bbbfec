// tb_dense_layer -- self-checking test of dense_layer (16 -> 16, layer 1
// weights).  A new random vector every clock (initiation interval 1),
// with gaps; every output vector is compared with the reference dense
// layer, and the latency must be 3 + 3 = 6 clocks.
module tb_dense_layer;
  import tb_ref_pkg::*;
  localparam int NI = 16, NO = 16, LAT = 6;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  always #5 clk = ~clk;
  logic signed [W-1:0] x [NI];
  logic signed [W-1:0] y [NO];
  int checks = 0, failures = 0;

  dense_layer #(.N_IN(NI), .N_OUT(NO), .W(W), .F(F), .LAYER(1)) dut (
    .clk, .rst_n, .in_valid, .x, .out_valid, .y);

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef longint vec_t [];
  vec_t  expq [$];
  int    sent_at [$];
  int    cyc = 0;

  always @(posedge clk) cyc <= cyc + 1;

  // Checker: compare every valid output with the oldest expected vector.
  always @(negedge clk) if (rst_n && out_valid) begin
    vec_t e;
    checks++;
    if (expq.size() == 0) begin failures++; $display("unexpected output"); end
    else begin
      e = expq.pop_front();
      if (cyc - sent_at.pop_front() != LAT) begin
        failures++; $display("latency wrong");
      end
      for (int j = 0; j < NO; j++) begin
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
    for (int n = 0; n < 150; n++) begin
      @(negedge clk);
      in_valid = (n % 7 != 3);
      v = new[NI];
      for (int i = 0; i < NI; i++) begin
        x[i] = W'($urandom_range(0, 2047) - 1024);   // -4 .. 4
        v[i] = x[i];
      end
      if (in_valid) begin
        expq.push_back(dense_ref(v, 1, NO));
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
