// ii_area_conn_tb - checks the AREA connection of the test interface's
// memory AREA_EXT (bus-wide slots: write 43..40, read 47..44) with random
// access vectors, directions and strobe levels.  Read data come either from
// the user-selected sub-area input or from the whole memory word, from which
// the module must pick bits 3..0 at addresses 8..11 and bits 7..4 at 12..15.
//
// Expected values are worked out from the example table (slot positions and
// sub-area addresses); the whole-word selection follows this design's
// reading of the standard.
module ii_area_conn_tb;
  import ii_pkg::*;

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

  logic [47:0] vena, put;
  logic        writeN, strobeN;
  logic [3:0]  din, addr, esel;
  logic [7:0]  mdin;
  logic        en, ren, wen, str, wstr, rstr;

  ii_area_conn dut (
    .vec_ena(vena), .II_writeN(writeN), .II_strobeN(strobeN), .data_in(din),
    .II_addr(addr), .mdata_in(mdin),
    .put_vec(put), .enable(en), .read_ena(ren), .write_ena(wen), .strobe(str),
    .write_str(wstr), .read_str(rstr)
  );

  initial begin
    for (int i = 0; i < 500; i++) begin
      logic w, r;
      @(posedge clk);
      vena    = 48'({$urandom, $urandom});
      if (i % 3 == 0) vena[47:40] = '0;
      writeN  = 1'($urandom);
      strobeN = 1'($urandom);
      din     = 4'($urandom);
      addr    = 4'($urandom);
      mdin    = 8'($urandom);
      if (i % 2 == 0) din = '0; else mdin = '0;
      #1;
      esel = (addr >= 12) ? mdin[7:4] : (addr >= 8) ? mdin[3:0] : 4'h0;
      w = |vena[43:40];
      r = |vena[47:44];
      chk("put", 64'(put), 64'(48'(din | esel) << 44));
      chk("write_ena", 64'(wen), 64'(w));
      chk("read_ena", 64'(ren), 64'(r));
      chk("enable", 64'(en), 64'(writeN ? r : w));
      chk("strobe", 64'(str), 64'(!strobeN && (writeN ? r : w)));
      chk("write_str", 64'(wstr), 64'(!strobeN && w));
      chk("read_str", 64'(rstr), 64'(!strobeN && r));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
