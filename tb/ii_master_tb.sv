// ii_master_tb - checks the II access cycle produced by the controller.
//
// A small peripheral model answers reads with a value derived from the
// address (a ^ 5) while II_operN is low and II_writeN high.  For random
// write and read requests the test measures, in clocks, the time from the
// address set-up to II_operN falling (T12 = 3), to II_strobeN falling
// (T23 = 2), to II_strobeN rising (T35 = 3), to II_operN rising (T56 = 3)
// and to II_writeN returning high (T68 = 2), and the request-to-done time
// (14).  It also checks the address and write data on the bus, that the
// controller drives data only in write cycles, and the read result.
//
// The step order follows the standard's access cycle; the phase lengths in
// clocks are this design's choice and are checked exactly.
module ii_master_tb;
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
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic       rst_n, req, we, busy, done;
  logic [3:0] addr, wdata, rdata, bus_addr, data_o, data_i;
  logic       resetN, operN, writeN, strobeN, data_oe;

  ii_master dut (
    .clk, .rst_n, .req, .we, .addr, .wdata, .busy, .done, .rdata,
    .II_resetN(resetN), .II_operN(operN), .II_writeN(writeN), .II_strobeN(strobeN),
    .II_addr(bus_addr), .data_o, .data_oe, .data_i
  );

  assign data_i = (!operN && writeN) ? (bus_addr ^ 4'h5) : 4'h0;

  task automatic access(bit w, logic [3:0] a, logic [3:0] d);
    int t = 0, t_set = -1, t_op = -1, t_sf = -1, t_sr = -1, t_or = -1, t_wr = -1;
    logic p_op = 1, p_st = 1, p_wn = 1;
    @(negedge clk);
    req = 1; we = w; addr = a; wdata = d;
    @(posedge clk);           // request accepted at this edge (t = 0)
    #1 req = 0;
    while (!done) begin
      @(posedge clk);
      t++;
      #1;
      if (t_set < 0 && busy) begin
        t_set = t - 1;
        chk("address", 64'(bus_addr), 64'(a));
        chk("direction", 64'(writeN), 64'(!w));
        chk("data drive", 64'(data_oe), 64'(w));
        if (w) chk("write data", 64'(data_o), 64'(d));
      end
      if (p_op && !operN) t_op = t;
      if (p_st && !strobeN) t_sf = t;
      if (!p_st && strobeN) t_sr = t;
      if (!p_op && operN) t_or = t;
      if (!p_wn && writeN) t_wr = t;
      if (!strobeN) chk("strobe inside operation", 64'(operN), 0);
      if (!w) chk("no drive in read", 64'(data_oe), 0);
      p_op = operN; p_st = strobeN; p_wn = writeN;
    end
    chk("T12", 64'(t_op - t_set), 3);
    chk("T23", 64'(t_sf - t_op), 2);
    chk("T35", 64'(t_sr - t_sf), 3);
    chk("T56", 64'(t_or - t_sr), 3);
    if (w) chk("T68", 64'(t_wr - t_or), 2);
    chk("request to done", 64'(t + 1), 14);
    chk("bus released", 64'({operN, strobeN, writeN, data_oe}), 64'(4'b1110));
    if (!w) chk("read data", 64'(rdata), 64'(a ^ 4'h5));
  endtask

  initial begin
    rst_n = 0; req = 0; we = 0; addr = 0; wdata = 0;
    repeat (3) @(posedge clk);
    #1 chk("reset drives II_resetN", 64'(resetN), 0);
    rst_n = 1;
    @(posedge clk);
    #1 chk("II_resetN released", 64'(resetN), 1);
    for (int i = 0; i < 200; i++) access(1'($urandom), 4'($urandom), 4'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
