// tb_one_layer_net -- self-checking test of one_layer_net at its default
// size (16 -> 16 -> 6).  Feature vectors are presented on consecutive
// clocks (initiation interval 1) and with gaps; every output vector is
// compared with sigmoid(dense2(relu(dense1(x)))) computed by the reference
// model, and the latency must be 14 clocks.
module tb_one_layer_net;
  import tb_ref_pkg::*;
  localparam int NI = 16, NH = 16, NO = 6, LAT = 14;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  always #5 clk = ~clk;
  logic signed [W-1:0] x [NI];
  logic signed [W-1:0] y [NO];
  int checks = 0, failures = 0, cyc = 0, back_to_back = 0;
  typedef longint vec_t [];
  vec_t expq [$];
  int   sent_at [$];

  one_layer_net dut (.clk, .rst_n, .in_valid, .x, .out_valid, .y);

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
      for (int j = 0; j < NO; j++) begin
        checks++;
        if (longint'(y[j]) != e[j]) begin
          failures++; $display("y[%0d] got %0d want %0d", j, y[j], e[j]);
        end
      end
    end
  end

  initial begin
    vec_t v, h;
    bit prev;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    prev = 0;
    for (int n = 0; n < 200; n++) begin
      @(negedge clk);
      in_valid = (n % 11 != 5);
      if (in_valid && prev) back_to_back++;
      prev = in_valid;
      v = new[NI];
      for (int i = 0; i < NI; i++) begin
        x[i] = W'($urandom_range(0, 1023) - 512);
        v[i] = x[i];
      end
      if (in_valid) begin
        h = dense_ref(v, 1, NH);
        foreach (h[j]) h[j] = relu_ref(h[j]);
        h = dense_ref(h, 2, NO);
        foreach (h[j]) h[j] = sigmoid_ref(h[j]);
        expq.push_back(h);
        sent_at.push_back(cyc);
      end
    end
    @(negedge clk) in_valid = 0;
    repeat (30) @(posedge clk);
    checks++;
    if (expq.size() != 0 || back_to_back == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
