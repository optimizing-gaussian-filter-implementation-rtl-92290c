// tb_gauss_gb_approx: self-checking test of the approximate graph-based Gaussian adder tree.
//
// Streams random 3x3 windows (plus all-zero and all-255 corner cases) with random
// idle cycles, and checks every result against the direct weighted sum
// sum(k_i * A_i) of the kernel [21 31 21; 31 48 31; 21 31 21]. It also checks that
// each result appears exactly LAT = 5 cycles after its window was offered.
module tb_gauss_gb_approx;
  import canny_ref_pkg::*;

  localparam int LAT = 5;
  localparam int N   = 3000;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        in_valid = 1'b0;
  logic [7:0]  in_a [9];
  logic        out_valid;
  logic [15:0] out_y;

  int checks = 0, failures = 0;
  int cycle = 0;
  int exp_q[$];
  int t_q[$];

  gauss_gb_approx dut (.clk, .rst_n, .in_valid, .in_a, .out_valid, .out_y);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Checker: compare values and latency.
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      int e, t;
      checks++;
      if (exp_q.size() == 0) begin
        failures++;
        $display("unexpected output %0d", out_y);
      end else begin
        e = exp_q.pop_front();
        t = t_q.pop_front();
        if (int'(out_y) != e || cycle - t != LAT) begin
          failures++;
          if (failures < 10) $display("mismatch: got %0d exp %0d latency %0d", out_y, e, cycle - t);
        end
      end
    end
  end

  initial begin
    foreach (in_a[i]) in_a[i] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < N; n++) begin
      int w[9];
      @(negedge clk);
      in_valid = ($urandom_range(0, 3) != 0);
      for (int i = 0; i < 9; i++) begin
        w[i] = (n == 0) ? 0 : (n == 1) ? 255 : $urandom_range(0, 255);
        in_a[i] = 8'(w[i]);
      end
      if (in_valid) begin
        exp_q.push_back(gauss_sum9(w));
        t_q.push_back(cycle);   // value seen by the next rising edge
      end
    end
    @(negedge clk);
    in_valid = 1'b0;
    repeat (LAT + 5) @(posedge clk);
    if (exp_q.size() != 0) begin
      failures++;
      $display("%0d results missing", exp_q.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
