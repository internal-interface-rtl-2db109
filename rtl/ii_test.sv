// ii_test - example Internal Interface peripheral (the standard test
// interface).
//
// Thirteen records are declared (ii_pkg::ii_test_decl) on two pages:
//   PAGE_REG : WORD_CHK  (bus width, read-only, returns the check code of
//                         the implementation table),
//              WORD_STAT (bus width, read-only, returns the constant
//                         STAT_VALUE),
//              WORD_INT  (2 x bus width, registered inside, read/write),
//              WORD_EXT  (TEST_WIDTH bits, external, read/write),
//              VECT_INT  with BITS_INT1 (2 bits) and BITS_INT2 (1 bit),
//                         registered inside, read/write,
//              VECT_EXT  with BITS_EXT1 (1 bit, external, write-only) and
//                         BITS_EXT2 (2 bits, external, read/write);
//   PAGE_AREA: AREA_EXT  (3 cells of TEST_WIDTH bits, external memory).
// With 4 address and 4 data lines the map is: 0 WORD_CHK, 1 WORD_STAT,
// 2-3 WORD_INT[0..1], 4-5 WORD_EXT (low, high nibble), 6 BITS_INT1 in D1..D0
// and BITS_INT2 in D2, 7 BITS_EXT1 in D0 and BITS_EXT2 in D2..D1, 8-11 the
// low nibble and 12-15 the high nibble of AREA_EXT; the interface vector is
// 48 bits long.
//
// The module is an ii_core plus one connection module per record copy; the
// ports carry the user-side signals of each record (data, enables, save
// and strobe windows) and the II bus.  The memory behind AREA_EXT is outside:
// it takes cell address and write data from the II bus and returns the
// addressed sub-area on area_data_in.  Timing is that of ii_core: registered
// records change on the rising edge of II_strobeN, everything else is
// combinational.  The record list, identifiers and widths follow the
// standard's example; the check code formula and the ports left out for the
// nonexistent second copy of WORD_EXT are this design's choices.
module ii_test
  import ii_pkg::*;
#(
  parameter int          II_ADDR_WIDTH = 4,
  parameter int          II_DATA_WIDTH = 4,
  parameter int          TEST_WIDTH    = 8,
  parameter logic [31:0] STAT_VALUE    = 32'h6,
  localparam int         AREA_W        = ii_min(TEST_WIDTH, II_DATA_WIDTH)
) (
  output logic [II_DATA_WIDTH-1:0] word_int0_data_out,
  output logic [II_DATA_WIDTH-1:0] word_int0_enable_out,
  output logic [II_DATA_WIDTH-1:0] word_int1_data_out,
  output logic [II_DATA_WIDTH-1:0] word_int1_enable_out,
  input  logic [TEST_WIDTH-1:0]    word_ext0_data_in,
  output logic [TEST_WIDTH-1:0]    word_ext0_data_out,
  output logic [TEST_WIDTH-1:0]    word_ext0_enable_out,
  output logic [TEST_WIDTH-1:0]    word_ext0_read_ena_out,
  output logic [TEST_WIDTH-1:0]    word_ext0_write_ena_out,
  output logic [TEST_WIDTH-1:0]    word_ext0_save_out,
  output logic [1:0]               bits_int1_data_out,
  output logic                     bits_int1_enable_out,
  output logic [0:0]               bits_int2_data_out,
  output logic                     bits_int2_enable_out,
  output logic [0:0]               bits_ext1_data_out,
  input  logic [1:0]               bits_ext2_data_in,
  output logic [1:0]               bits_ext2_data_out,
  output logic                     bits_ext2_enable_out,
  output logic                     bits_ext2_read_ena_out,
  output logic                     bits_ext2_write_ena_out,
  output logic                     bits_ext2_save_out,
  input  logic [AREA_W-1:0]        area_data_in,
  output logic                     area_enable_out,
  output logic                     area_read_ena_out,
  output logic                     area_write_ena_out,
  output logic                     area_strobe_out,
  input  logic                     II_resetN,
  input  logic                     II_operN,
  input  logic                     II_writeN,
  input  logic                     II_strobeN,
  input  logic [II_ADDR_WIDTH-1:0] II_addr,
  input  logic [II_DATA_WIDTH-1:0] II_data_in,
  output logic [II_DATA_WIDTH-1:0] II_data_out
);

  localparam int            AW      = II_ADDR_WIDTH;
  localparam int            DW      = II_DATA_WIDTH;
  localparam int            N       = II_TEST_N_ITEMS;
  localparam ii_decl_list_t DECL    = ii_test_decl(DW, TEST_WIDTH);
  localparam ii_table_t     TBL     = ii_build(DECL, N, AW, DW);
  localparam int            VEC_LEN = ii_vec_len(TBL);
  localparam logic [DW-1:0] CHECK_CODE = DW'(ii_check_code(TBL, N, DW));

  logic [VEC_LEN-1:0] vec_ext, vec_int, vec_all, vec_ena;
  logic [VEC_LEN-1:0] put_chk, put_stat, put_ext, put_bext2, put_area;

  ii_core #(.II_ADDR_WIDTH(AW), .II_DATA_WIDTH(DW), .N_ITEMS(N), .DECL(DECL)) u_core (
    .II_resetN, .II_operN, .II_writeN, .II_strobeN, .II_addr, .II_data_in, .II_data_out,
    .vec_ext, .vec_int, .vec_all, .vec_ena
  );

  assign vec_ext = put_chk | put_stat | put_ext | put_bext2 | put_area;

  // Read-only words fed with constants.
  ii_word_conn #(.II_ADDR_WIDTH(AW), .II_DATA_WIDTH(DW), .N_ITEMS(N), .DECL(DECL),
                 .ID(WORD_CHK), .POS(0)) u_chk (
    .vec_all, .vec_ena, .II_writeN, .II_strobeN, .data_in(CHECK_CODE), .put_vec(put_chk),
    .data_out(), .enable(), .read_ena(), .write_ena(), .save(), .cur_out()
  );
  ii_word_conn #(.II_ADDR_WIDTH(AW), .II_DATA_WIDTH(DW), .N_ITEMS(N), .DECL(DECL),
                 .ID(WORD_STAT), .POS(0)) u_stat (
    .vec_all, .vec_ena, .II_writeN, .II_strobeN, .data_in(DW'(STAT_VALUE)), .put_vec(put_stat),
    .data_out(), .enable(), .read_ena(), .write_ena(), .save(), .cur_out()
  );

  // Internal registers.
  ii_word_conn #(.II_ADDR_WIDTH(AW), .II_DATA_WIDTH(DW), .N_ITEMS(N), .DECL(DECL),
                 .ID(WORD_INT), .POS(0)) u_int0 (
    .vec_all, .vec_ena, .II_writeN, .II_strobeN, .data_in('0), .put_vec(),
    .data_out(word_int0_data_out), .enable(word_int0_enable_out),
    .read_ena(), .write_ena(), .save(), .cur_out()
  );
  ii_word_conn #(.II_ADDR_WIDTH(AW), .II_DATA_WIDTH(DW), .N_ITEMS(N), .DECL(DECL),
                 .ID(WORD_INT), .POS(1)) u_int1 (
    .vec_all, .vec_ena, .II_writeN, .II_strobeN, .data_in('0), .put_vec(),
    .data_out(word_int1_data_out), .enable(word_int1_enable_out),
    .read_ena(), .write_ena(), .save(), .cur_out()
  );

  // External register.
  ii_word_conn #(.II_ADDR_WIDTH(AW), .II_DATA_WIDTH(DW), .N_ITEMS(N), .DECL(DECL),
                 .ID(WORD_EXT), .POS(0)) u_ext0 (
    .vec_all, .vec_ena, .II_writeN, .II_strobeN, .data_in(word_ext0_data_in), .put_vec(put_ext),
    .data_out(word_ext0_data_out), .enable(word_ext0_enable_out),
    .read_ena(word_ext0_read_ena_out), .write_ena(word_ext0_write_ena_out),
    .save(word_ext0_save_out), .cur_out()
  );

  // Bit fields.
  ii_bits_conn #(.II_ADDR_WIDTH(AW), .II_DATA_WIDTH(DW), .N_ITEMS(N), .DECL(DECL),
                 .ID(BITS_INT1), .POS(0)) u_bint1 (
    .vec_all, .vec_ena, .II_writeN, .II_strobeN, .data_in('0), .put_vec(),
    .data_out(bits_int1_data_out), .enable(bits_int1_enable_out),
    .read_ena(), .write_ena(), .save()
  );
  ii_bits_conn #(.II_ADDR_WIDTH(AW), .II_DATA_WIDTH(DW), .N_ITEMS(N), .DECL(DECL),
                 .ID(BITS_INT2), .POS(0)) u_bint2 (
    .vec_all, .vec_ena, .II_writeN, .II_strobeN, .data_in('0), .put_vec(),
    .data_out(bits_int2_data_out), .enable(bits_int2_enable_out),
    .read_ena(), .write_ena(), .save()
  );
  ii_bits_conn #(.II_ADDR_WIDTH(AW), .II_DATA_WIDTH(DW), .N_ITEMS(N), .DECL(DECL),
                 .ID(BITS_EXT1), .POS(0)) u_bext1 (
    .vec_all, .vec_ena, .II_writeN, .II_strobeN, .data_in('0), .put_vec(),
    .data_out(bits_ext1_data_out), .enable(), .read_ena(), .write_ena(), .save()
  );
  ii_bits_conn #(.II_ADDR_WIDTH(AW), .II_DATA_WIDTH(DW), .N_ITEMS(N), .DECL(DECL),
                 .ID(BITS_EXT2), .POS(0)) u_bext2 (
    .vec_all, .vec_ena, .II_writeN, .II_strobeN, .data_in(bits_ext2_data_in), .put_vec(put_bext2),
    .data_out(bits_ext2_data_out), .enable(bits_ext2_enable_out),
    .read_ena(bits_ext2_read_ena_out), .write_ena(bits_ext2_write_ena_out),
    .save(bits_ext2_save_out)
  );

  // External memory area.
  ii_area_conn #(.II_ADDR_WIDTH(AW), .II_DATA_WIDTH(DW), .N_ITEMS(N), .DECL(DECL),
                 .ID(AREA_EXT)) u_area (
    .II_addr, .mdata_in('0),
    .vec_ena, .II_writeN, .II_strobeN, .data_in(area_data_in), .put_vec(put_area),
    .enable(area_enable_out), .read_ena(area_read_ena_out), .write_ena(area_write_ena_out),
    .strobe(area_strobe_out), .write_str(), .read_str()
  );

endmodule
