// ii_bits_conn - user-side connection of one copy of a VII_BITS record.
//
// A BITS record is a small field packed with others into one bus word of its
// VECT group, so it is always reached as a whole and its access signals are
// single bits.  For copy POS of record ID the module gives:
//   put_vec    data_in placed in the read slot (externally read records),
//              to be ORed into the core's vec_ext,
//   data_out   the write slot: registered value or bus data of the cycle,
//   read_ena   the record is being read,
//   write_ena  the record is being written (external records only),
//   enable     read_ena in a read cycle, write_ena in a write cycle,
//   save       write_ena while II_strobeN is low.
// With POS = -1 the module covers all ItemNumber copies at once, copy 0 in
// the lowest bits of data_in/data_out; all copies sit in one data word, so
// the single-bit access signals cover the whole table.
// All outputs are combinational.  Parameters default to record BITS_EXT2 of
// the example test interface.
//
// Following the standard: the put/get data, enable, read/write enable and
// save signals of a bit-field record, single-bit because a field is never
// split, and the whole-table put.  This design's own choice: one module per
// copy (or per table) gathers what the standard provides as separate
// functions.
module ii_bits_conn
  import ii_pkg::*;
#(
  parameter int            II_ADDR_WIDTH = 4,
  parameter int            II_DATA_WIDTH = 4,
  parameter int            N_ITEMS       = II_TEST_N_ITEMS,
  parameter ii_decl_list_t DECL          = ii_test_decl(4, 8),
  parameter int            ID            = BITS_EXT2,
  parameter int            POS           = 0,
  localparam ii_table_t    TBL           = ii_build(DECL, N_ITEMS, II_ADDR_WIDTH, II_DATA_WIDTH),
  localparam int           VEC_LEN       = ii_vec_len(TBL),
  localparam int           IDX           = ii_find(DECL, N_ITEMS, ID),
  localparam int           W             = (TBL[IDX].width > 0) ? int'(TBL[IDX].width) : 1,
  localparam int           NUM           = (TBL[IDX].number > 0) ? int'(TBL[IDX].number) : 1,
  localparam int           CW            = (POS < 0) ? W * NUM : W
) (
  input  logic [VEC_LEN-1:0] vec_all,
  input  logic [VEC_LEN-1:0] vec_ena,
  input  logic               II_writeN,
  input  logic               II_strobeN,
  input  logic [CW-1:0]      data_in,
  output logic [VEC_LEN-1:0] put_vec,
  output logic [CW-1:0]      data_out,
  output logic               enable,
  output logic               read_ena,
  output logic               write_ena,
  output logic               save
);

  localparam int WP = int'(TBL[IDX].wr_pos);
  localparam int RP = int'(TBL[IDX].rd_pos);
  localparam bit HAS_WR  = (TBL[IDX].item_type == VII_BITS) && (WP >= 0);
  localparam bit HAS_RD  = (TBL[IDX].item_type == VII_BITS) && (RP >= 0);
  localparam bit EXT_RD  = HAS_RD && (TBL[IDX].rd_type == VII_REXTERNAL);
  localparam bit INT_REG = TBL[IDX].rd_type == VII_RINTERNAL;
  localparam int OFF     = (POS < 0) ? 0 : POS * W;
  localparam int VW      = VEC_LEN + W * NUM;

  if (TBL[IDX].item_type != VII_BITS || POS < -1 || POS >= int'(TBL[IDX].number)) begin : g_bad
    $error("ii_bits_conn: record %0d copy %0d is not a declared BITS", ID, POS);
  end

  logic [VW-1:0] all_w, ena_w;
  assign all_w = VW'(vec_all);
  assign ena_w = VW'(vec_ena);

  if (HAS_WR) begin : g_wr
    assign data_out  = all_w[WP + OFF +: CW];
    assign write_ena = INT_REG ? 1'b0 : |ena_w[WP + OFF +: CW];
  end else begin : g_no_wr
    assign data_out  = '0;
    assign write_ena = 1'b0;
  end

  if (HAS_RD) begin : g_rd
    assign read_ena = |ena_w[RP + OFF +: CW];
  end else begin : g_no_rd
    assign read_ena = 1'b0;
  end

  if (EXT_RD) begin : g_put
    assign put_vec = VEC_LEN'(VW'(data_in) << (RP + OFF));
  end else begin : g_no_put
    assign put_vec = '0;
  end

  assign enable = II_writeN ? read_ena : write_ena;
  assign save   = write_ena & ~II_strobeN;

endmodule
