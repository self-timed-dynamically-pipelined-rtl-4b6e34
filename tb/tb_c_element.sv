// tb_c_element: self-checking test of the Muller C-element.
//
// 400 random input pairs are applied, one per clock cycle.  A model kept by
// the testbench (output follows the inputs when they agree, holds otherwise)
// predicts the output after every edge, starting from the reset value.
module tb_c_element;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic x = 1'b0, y = 1'b0, z, model;

  c_element #(.RST_VAL(1'b0)) dut (.clk, .rst_n, .x, .y, .z);

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    model = 1'b0;
    checks++;
    if (z !== 1'b0) begin failures++; $display("reset value %b", z); end
    for (int i = 0; i < 400; i++) begin
      x = 1'($urandom); y = 1'($urandom);
      @(negedge clk);
      if (x == y) model = x;
      checks++;
      if (z !== model) begin
        failures++;
        if (failures < 10) $display("step %0d: x=%b y=%b z=%b expected %b", i, x, y, z, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
