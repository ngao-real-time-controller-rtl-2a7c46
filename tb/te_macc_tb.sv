// te_macc_tb -- self-checking test of the te_macc multiply-accumulator.
// Drives random 18-bit operands and random operations (hold, load, add,
// subtract) and compares the 48-bit accumulator after every clock with a
// reference accumulator kept in the testbench. Also checks reset to zero.
module te_macc_tb;
  import te_pkg::*;
  logic clk = 0, rst_n = 0;
  word_t a, b;
  mac_op_e op;
  acc_t p, model;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  te_macc dut (.clk, .rst_n, .a, .b, .op, .p);
  initial begin
    #100000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
  initial begin
    a = '0; b = '0; op = MAC_HOLD; model = '0;
    repeat (2) @(posedge clk);
    #1;
    checks++; if (p !== '0) begin failures++; $display("reset: p=%h", p); end
    rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      a  = word_t'($urandom);
      b  = word_t'($urandom);
      op = mac_op_e'($urandom_range(0, 3));
      if (i % 97 == 0) begin a = 18'sh1ffff; b = 18'sh20000; end
      @(posedge clk);
      case (op)
        MAC_HOLD: ;
        MAC_LOAD: model = acc_t'(a) * acc_t'(b);
        MAC_ADD:  model = model + acc_t'(a) * acc_t'(b);
        MAC_SUB:  model = model - acc_t'(a) * acc_t'(b);
      endcase
      #1;
      checks++;
      if (p !== model) begin
        failures++;
        if (failures < 10) $display("step %0d op %0d: p=%h expected %h", i, op, p, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
