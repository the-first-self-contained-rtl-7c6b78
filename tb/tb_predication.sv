// tb_predication: self-checking test of the predication stage.
//
// Drives random element vectors, every bit index (including one beyond the
// element width) and both order flags, and compares each predicate with the
// value worked out here from the element's bit and the flag.
module tb_predication;
  localparam int unsigned N  = 8;
  localparam int unsigned K  = 5;
  localparam int unsigned IW = $clog2(K);

  logic [K-1:0]  elements [N];
  logic [IW-1:0] bit_index;
  logic          is_descending;
  logic [N-1:0]  pred;

  int checks = 0, failures = 0;

  predication #(.N(N), .K(K)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 300; t++) begin
      for (int j = 0; j < N; j++) elements[j] = K'($urandom);
      bit_index     = IW'($urandom_range(0, (1 << IW) - 1));
      is_descending = 1'($urandom);
      #1;
      for (int j = 0; j < N; j++) begin
        logic b, exp;
        b   = (bit_index < K) ? ((elements[j] >> bit_index) & 1) : 1'b0;
        exp = (b == is_descending);
        checks++;
        if (pred[j] !== exp) begin
          failures++;
          $display("mismatch t=%0d j=%0d elem=%h bit=%0d desc=%0d pred=%0d exp=%0d",
                   t, j, elements[j], bit_index, is_descending, pred[j], exp);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
