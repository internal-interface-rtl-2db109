// ii_data_buffer_tb - checks the data bus buffer over all combinations of
// II_operN and II_writeN with random data: the pad is driven with
// II_data_out only in a read cycle and II_data_in always follows the pad.
//
// The direction rule (drive only in a read cycle while the operation is
// open) follows the standard; the exhaustive stimulus is this testbench's
// own.
module ii_data_buffer_tb;
  int checks = 0, failures = 0;

  task automatic chk(string what, logic [63:0] got, logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  logic clk = 0;
  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic       operN, writeN, oe;
  logic [3:0] dout, din, pi, po;

  ii_data_buffer dut (
    .II_operN(operN), .II_writeN(writeN), .II_data_out(dout), .II_data_in(din),
    .pad_i(pi), .pad_o(po), .pad_oe(oe)
  );

  initial begin
    for (int i = 0; i < 400; i++) begin
      @(posedge clk);
      operN  = i[0];
      writeN = i[1];
      dout   = 4'($urandom);
      pi     = 4'($urandom);
      #1;
      chk("oe", 64'(oe), 64'(!operN && writeN));
      chk("pad_o", 64'(po), 64'((!operN && writeN) ? dout : 4'h0));
      chk("data_in", 64'(din), 64'(pi));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
