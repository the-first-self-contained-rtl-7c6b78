// tb_prefix_iteration: self-checking test of one prefix-sum layer.
//
// Instantiates layers with offsets 1, 2 and 4, drives random lane values and
// checks b[j] = a[j] + a[j-offset] (modulo the lane width) for j >= offset
// and b[j] = a[j] below it.
module tb_prefix_iteration;
  localparam int unsigned N = 8;
  localparam int unsigned W = 4;

  logic [W-1:0] a  [N];
  logic [W-1:0] b1 [N];
  logic [W-1:0] b2 [N];
  logic [W-1:0] b4 [N];

  int checks = 0, failures = 0;

  prefix_iteration #(.N(N), .W(W), .OFFSET(1)) dut1 (.a(a), .b(b1));
  prefix_iteration #(.N(N), .W(W), .OFFSET(2)) dut2 (.a(a), .b(b2));
  prefix_iteration #(.N(N), .W(W), .OFFSET(4)) dut4 (.a(a), .b(b4));

  function automatic logic [W-1:0] expect_lane(int j, int off);
    if (j >= off) return W'(a[j] + a[j-off]);
    return a[j];
  endfunction

  task automatic check(int j, int off, logic [W-1:0] got);
    logic [W-1:0] e;
    e = expect_lane(j, off);
    checks++;
    if (got !== e) begin
      failures++;
      $display("mismatch off=%0d j=%0d got=%0d exp=%0d", off, j, got, e);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 200; t++) begin
      for (int j = 0; j < N; j++) a[j] = W'($urandom);
      #1;
      for (int j = 0; j < N; j++) begin
        check(j, 1, b1[j]);
        check(j, 2, b2[j]);
        check(j, 4, b4[j]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
