// te_coef_ram_tb -- self-checking test of the PE coefficient RAM.
// Fills the RAM through port A, reads every word back through both ports
// (one clock read latency), and checks read-first behaviour of port A when
// reading and writing the same address in one clock. Uses a small address
// width (AW = 6) so the whole RAM is covered quickly.
module te_coef_ram_tb;
  import te_pkg::*;
  localparam int AW = 6;
  logic clk = 0;
  logic [AW-1:0] addr_a, addr_b;
  logic we_a;
  word_t din_a, dout_a, dout_b;
  word_t model [2**AW];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  te_coef_ram #(.AW(AW)) dut (.clk, .addr_a, .we_a, .din_a, .dout_a, .addr_b, .dout_b);
  initial begin
    #200000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
  initial begin
    we_a = 0; addr_a = 0; addr_b = 0; din_a = 0;
    for (int i = 0; i < 2**AW; i++) begin
      @(negedge clk);
      we_a = 1; addr_a = AW'(i); din_a = word_t'($urandom);
      model[i] = din_a;
    end
    @(negedge clk); we_a = 0;
    for (int i = 0; i < 2**AW; i++) begin
      addr_a = AW'(i); addr_b = AW'((2**AW - 1) - i);
      @(negedge clk);
      checks += 2;
      if (dout_a !== model[i]) begin failures++; $display("A[%0d]=%h exp %h", i, dout_a, model[i]); end
      if (dout_b !== model[(2**AW - 1) - i]) begin failures++; $display("B mismatch at %0d", i); end
    end
    // read-first: write new value, old value must appear
    for (int i = 0; i < 20; i++) begin
      int ad;
      ad = $urandom_range(0, 2**AW - 1);
      addr_a = AW'(ad); addr_b = AW'(ad); we_a = 1; din_a = word_t'($urandom);
      @(negedge clk);
      we_a = 0;
      checks++;
      if (dout_a !== model[ad]) begin failures++; $display("read-first fail at %0d", ad); end
      model[ad] = din_a;
      @(negedge clk);
      checks++;
      if (dout_b !== model[ad]) begin failures++; $display("write not seen on B at %0d", ad); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
