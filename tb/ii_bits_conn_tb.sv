// ii_bits_conn_tb - checks the BITS connection of the test interface's
// external field BITS_EXT2 (2 bits: write slot 37..36, read slot 39..38),
// the write-only BITS_EXT1 (bit 35) and the registered BITS_INT2 (bit 34),
// with random interface vectors, directions and strobe levels.  A small
// list of its own (a 3-bit field declared twice on an 8-bit bus) checks the
// whole-table connection (POS = -1) against copy 1 alone.
//
// Expected slot positions come from the example table of the standard; the
// random stimulus is this testbench's own.
module ii_bits_conn_tb;
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

  logic [47:0] vall, vena, put2, put1, puti;
  logic        writeN, strobeN;
  logic [1:0]  din2, dout2;
  logic [0:0]  din1, dout1, dini, douti;
  logic        en2, ren2, wen2, sv2, en1, ren1, wen1, sv1, eni, reni, weni, svi;

  // A list of its own for the whole-table case: one 3-bit field declared
  // twice, written and read externally, on an 8-bit bus.  Its write slot is
  // vector bits 5..0 (copy 1 at 5..3), its read slot 11..6.
  function automatic ii_decl_list_t tab_list();
    ii_decl_list_t l = '0;
    l[0] = ii_decl(VII_PAGE, 1,  0, 0, 1, VII_WNOACCESS, VII_RNOACCESS);
    l[1] = ii_decl(VII_VECT, 2,  0, 0, 1, VII_WNOACCESS, VII_RNOACCESS);
    l[2] = ii_decl(VII_BITS, 20, 3, 2, 2, VII_WACCESS,   VII_REXTERNAL);
    return l;
  endfunction
  localparam ii_decl_list_t TL = tab_list();

  logic [11:0] tvall, tvena, tput_all, tput_1;
  logic [5:0]  tdin_all, tdout_all;
  logic [2:0]  tdin_1, tdout_1;
  logic        ten, tren, twen, tsv, ten1, tren1, twen1, tsv1;

  ii_bits_conn #(.II_ADDR_WIDTH(4), .II_DATA_WIDTH(8), .N_ITEMS(3), .DECL(TL), .ID(20), .POS(-1))
    dut_tab (
    .vec_all(tvall), .vec_ena(tvena), .II_writeN(writeN), .II_strobeN(strobeN),
    .data_in(tdin_all), .put_vec(tput_all), .data_out(tdout_all), .enable(ten),
    .read_ena(tren), .write_ena(twen), .save(tsv)
  );
  ii_bits_conn #(.II_ADDR_WIDTH(4), .II_DATA_WIDTH(8), .N_ITEMS(3), .DECL(TL), .ID(20), .POS(1))
    dut_tab1 (
    .vec_all(tvall), .vec_ena(tvena), .II_writeN(writeN), .II_strobeN(strobeN),
    .data_in(tdin_1), .put_vec(tput_1), .data_out(tdout_1), .enable(ten1),
    .read_ena(tren1), .write_ena(twen1), .save(tsv1)
  );


  ii_bits_conn dut2 (
    .vec_all(vall), .vec_ena(vena), .II_writeN(writeN), .II_strobeN(strobeN),
    .data_in(din2), .put_vec(put2), .data_out(dout2), .enable(en2),
    .read_ena(ren2), .write_ena(wen2), .save(sv2)
  );
  ii_bits_conn #(.ID(BITS_EXT1)) dut1 (
    .vec_all(vall), .vec_ena(vena), .II_writeN(writeN), .II_strobeN(strobeN),
    .data_in(din1), .put_vec(put1), .data_out(dout1), .enable(en1),
    .read_ena(ren1), .write_ena(wen1), .save(sv1)
  );
  ii_bits_conn #(.ID(BITS_INT2)) duti (
    .vec_all(vall), .vec_ena(vena), .II_writeN(writeN), .II_strobeN(strobeN),
    .data_in(dini), .put_vec(puti), .data_out(douti), .enable(eni),
    .read_ena(reni), .write_ena(weni), .save(svi)
  );

  initial begin
    for (int i = 0; i < 500; i++) begin
      @(posedge clk);
      vall    = 48'({$urandom, $urandom});
      vena    = 48'({$urandom, $urandom});
      writeN  = 1'($urandom);
      strobeN = 1'($urandom);
      din2    = 2'($urandom);
      tvall   = 12'($urandom);
      tvena   = 12'($urandom);
      if (i % 4 == 0) tvena = '0;
      tdin_all = 6'($urandom);
      tdin_1   = 3'($urandom);
      din1    = 1'($urandom);
      dini    = 1'($urandom);
      #1;
      chk("tab put", 64'(tput_all), 64'(12'(tdin_all) << 6));
      chk("tab data", 64'(tdout_all), 64'(tvall[5:0]));
      chk("tab write_ena", 64'(twen), 64'(|tvena[5:0]));
      chk("tab read_ena", 64'(tren), 64'(|tvena[11:6]));
      chk("tab enable", 64'(ten), 64'(writeN ? |tvena[11:6] : |tvena[5:0]));
      chk("tab save", 64'(tsv), 64'(!strobeN && |tvena[5:0]));
      chk("tab copy 1 put", 64'(tput_1), 64'(12'(tdin_1) << 9));
      chk("tab copy 1 data", 64'(tdout_1), 64'(tvall[5:3]));
      chk("tab copy 1 write_ena", 64'(twen1), 64'(|tvena[5:3]));
      chk("tab copy 1 read_ena", 64'(tren1), 64'(|tvena[11:9]));
      chk("ext2 put", 64'(put2), 64'(48'(din2) << 38));
      chk("ext2 data", 64'(dout2), 64'(vall[37:36]));
      chk("ext2 write_ena", 64'(wen2), 64'(|vena[37:36]));
      chk("ext2 read_ena", 64'(ren2), 64'(|vena[39:38]));
      chk("ext2 enable", 64'(en2), 64'(writeN ? |vena[39:38] : |vena[37:36]));
      chk("ext2 save", 64'(sv2), 64'(!strobeN && |vena[37:36]));
      chk("ext1 put", 64'(put1), 0);
      chk("ext1 data", 64'(dout1), 64'(vall[35]));
      chk("ext1 read_ena", 64'(ren1), 0);
      chk("ext1 save", 64'(sv1), 64'(!strobeN && vena[35]));
      chk("int2 data", 64'(douti), 64'(vall[34]));
      chk("int2 enable", 64'(eni), 64'(writeN && vena[34]));
      chk("int2 write_ena", 64'(weni), 0);
      chk("int2 put", 64'(puti), 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
