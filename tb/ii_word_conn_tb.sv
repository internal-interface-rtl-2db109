// ii_word_conn_tb - checks the WORD connection of the test interface's
// external register WORD_EXT (8 bits: write slot 23..16, read slot 31..24)
// and of copy 1 of the registered WORD_INT (4 bits at 15..12), with random
// interface vectors, directions and strobe levels.  The merged current value
// must take the bus data on the bits being written and the register's own
// value on the others.  The whole-table connection (POS = -1) is checked on
// WORD_INT and on a two-copy external word from a list of its own.
module ii_word_conn_tb;
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

  logic [47:0] vall, vena, put_e, put_i;
  logic        writeN, strobeN;
  logic [7:0]  din_e, dout_e, en_e, ren_e, wen_e, sv_e, cur_e;
  logic [3:0]  din_i, dout_i, en_i, ren_i, wen_i, sv_i, cur_i;

  // Whole-table connections: WORD_INT (two registered 4-bit copies, vector
  // bits 15..8) and, from a list of its own, a 6-bit external word declared
  // twice on a 4-bit bus (write slot 11..0, read slot 23..12).
  function automatic ii_decl_list_t tab_list();
    ii_decl_list_t l = '0;
    l[0] = ii_decl(VII_PAGE, 1,  0, 0, 1, VII_WNOACCESS, VII_RNOACCESS);
    l[1] = ii_decl(VII_WORD, 30, 6, 2, 1, VII_WACCESS,   VII_REXTERNAL);
    return l;
  endfunction
  localparam ii_decl_list_t TL = tab_list();

  logic [7:0]  ti_dout, ti_en, ti_ren, ti_wen, ti_sv, ti_cur;
  logic [47:0] ti_put;
  logic [23:0] tvall, tvena, tx_put;
  logic [11:0] tx_din, tx_dout, tx_en, tx_ren, tx_wen, tx_sv, tx_cur;

  ii_word_conn #(.ID(WORD_INT), .POS(-1)) dut_int_tab (
    .vec_all(vall), .vec_ena(vena), .II_writeN(writeN), .II_strobeN(strobeN),
    .data_in('0), .put_vec(ti_put), .data_out(ti_dout), .enable(ti_en),
    .read_ena(ti_ren), .write_ena(ti_wen), .save(ti_sv), .cur_out(ti_cur)
  );
  ii_word_conn #(.II_ADDR_WIDTH(4), .II_DATA_WIDTH(4), .N_ITEMS(2), .DECL(TL), .ID(30), .POS(-1))
    dut_ext_tab (
    .vec_all(tvall), .vec_ena(tvena), .II_writeN(writeN), .II_strobeN(strobeN),
    .data_in(tx_din), .put_vec(tx_put), .data_out(tx_dout), .enable(tx_en),
    .read_ena(tx_ren), .write_ena(tx_wen), .save(tx_sv), .cur_out(tx_cur)
  );

  ii_word_conn dut_ext (
    .vec_all(vall), .vec_ena(vena), .II_writeN(writeN), .II_strobeN(strobeN),
    .data_in(din_e), .put_vec(put_e), .data_out(dout_e), .enable(en_e),
    .read_ena(ren_e), .write_ena(wen_e), .save(sv_e), .cur_out(cur_e)
  );
  ii_word_conn #(.ID(WORD_INT), .POS(1)) dut_int (
    .vec_all(vall), .vec_ena(vena), .II_writeN(writeN), .II_strobeN(strobeN),
    .data_in(din_i), .put_vec(put_i), .data_out(dout_i), .enable(en_i),
    .read_ena(ren_i), .write_ena(wen_i), .save(sv_i), .cur_out(cur_i)
  );

  initial begin
    for (int i = 0; i < 500; i++) begin
      @(posedge clk);
      vall    = 48'({$urandom, $urandom});
      vena    = 48'({$urandom, $urandom});
      writeN  = 1'($urandom);
      strobeN = 1'($urandom);
      din_e   = 8'($urandom);
      din_i   = 4'($urandom);
      tvall   = 24'($urandom);
      tvena   = 24'($urandom);
      tx_din  = 12'($urandom);
      #1;
      chk("ext put", 64'(put_e), 64'(48'(din_e) << 24));
      chk("ext data", 64'(dout_e), 64'(vall[23:16]));
      chk("ext write_ena", 64'(wen_e), 64'(vena[23:16]));
      chk("ext read_ena", 64'(ren_e), 64'(vena[31:24]));
      chk("ext enable", 64'(en_e), 64'(writeN ? vena[31:24] : vena[23:16]));
      chk("ext save", 64'(sv_e), 64'(strobeN ? 8'h0 : vena[23:16]));
      chk("ext current", 64'(cur_e), 64'(8'((vena[23:16] & vall[23:16]) | (~vena[23:16] & din_e))));
      chk("int current", 64'(cur_i), 64'(vall[15:12]));
      chk("int put", 64'(put_i), 0);
      chk("int tab data", 64'(ti_dout), 64'(vall[15:8]));
      chk("int tab read_ena", 64'(ti_ren), 64'(vena[15:8]));
      chk("int tab write_ena", 64'({ti_wen, ti_sv}), 0);
      chk("int tab enable", 64'(ti_en), 64'(writeN ? vena[15:8] : 8'h00));
      chk("int tab current", 64'(ti_cur), 64'(vall[15:8]));
      chk("int tab put", 64'(ti_put), 0);
      chk("ext tab put", 64'(tx_put), 64'(24'(tx_din) << 12));
      chk("ext tab data", 64'(tx_dout), 64'(tvall[11:0]));
      chk("ext tab write_ena", 64'(tx_wen), 64'(tvena[11:0]));
      chk("ext tab read_ena", 64'(tx_ren), 64'(tvena[23:12]));
      chk("ext tab enable", 64'(tx_en), 64'(writeN ? tvena[23:12] : tvena[11:0]));
      chk("ext tab save", 64'(tx_sv), 64'(strobeN ? 12'h0 : tvena[11:0]));
      chk("ext tab current", 64'(tx_cur), 64'(12'((tvena[11:0] & tvall[11:0]) | (~tvena[11:0] & tx_din))));
      chk("int data", 64'(dout_i), 64'(vall[15:12]));
      chk("int write_ena", 64'(wen_i), 0);
      chk("int read_ena", 64'(ren_i), 64'(vena[15:12]));
      chk("int enable", 64'(en_i), 64'(writeN ? vena[15:12] : 4'h0));
      chk("int save", 64'(sv_i), 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
