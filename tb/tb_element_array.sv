// tb_element_array: self-checking test of the element register array.
//
// Applies reset, then random sequences of load, update, both at once and
// neither, and compares the array after every clock with a model kept here:
// reset clears it, load wins over update, and with neither it holds.
module tb_element_array;
  localparam int unsigned N = 8;
  localparam int unsigned K = 3;

  logic         clk = 1'b0;
  logic         rst_n;
  logic         load, update;
  logic [K-1:0] load_data [N], update_data [N], elements [N];
  logic [K-1:0] model [N];

  int checks = 0, failures = 0;
  int cycles = 0;

  element_array #(.N(N), .K(K)) dut (.*);

  always #5 clk = ~clk;

  always @(posedge clk) begin
    cycles++;
    if (cycles > 5000) begin
      failures++;
      $display("watchdog expired");
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  task automatic compare(string tag);
    for (int i = 0; i < N; i++) begin
      checks++;
      if (elements[i] !== model[i]) begin
        failures++;
        $display("%s mismatch [%0d] got=%0d exp=%0d", tag, i, elements[i], model[i]);
      end
    end
  endtask

  initial begin
    rst_n = 1'b0; load = 1'b0; update = 1'b0;
    for (int i = 0; i < N; i++) begin load_data[i] = '0; update_data[i] = '0; end
    #12;
    for (int i = 0; i < N; i++) model[i] = '0;
    compare("reset");
    @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 400; t++) begin
      load   = 1'($urandom);
      update = 1'($urandom);
      for (int i = 0; i < N; i++) begin
        load_data[i]   = K'($urandom);
        update_data[i] = K'($urandom);
      end
      if (load)        model = load_data;
      else if (update) model = update_data;
      @(negedge clk);
      compare("step");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
