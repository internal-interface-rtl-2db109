// ii_word_conn - user-side connection of one copy of a VII_WORD record.
//
// A WORD record of ItemWidth bits may span several bus addresses (one per
// bus-wide partition).  This module reaches into the interface vectors of an
// ii_core for copy POS of record ID and gives the user logic:
//   put_vec    data_in placed in the record's read slot, to be ORed into the
//              core's vec_ext (only for externally read records, else 0),
//   data_out   the record's write slot: the registered value for an
//              internally read record, the bus data of the running cycle for
//              an external one (valid only while write_ena is set),
//   read_ena   per bit: the bit is being read in the current cycle,
//   write_ena  per bit: the bit is being written in the current cycle
//              (external records only; registered records give 0),
//   enable     read_ena during a read cycle, write_ena during a write cycle,
//   save       write_ena while II_strobeN is low: the window in which an
//              external register should take data_out,
//   cur_out    the value the record copy takes if it is updated now: per bit,
//              the bus data where write_ena is set and data_in (the external
//              register's present value) elsewhere; for a registered record
//              simply the register.  Feeding cur_out back into an external
//              register on the save window updates only the partition the
//              address reaches.
// With POS = -1 the module covers all ItemNumber copies at once (the
// record's whole table): data and per-bit signals are then
// ItemWidth*ItemNumber bits wide, copy 0 in the lowest bits.
// Per-bit enables let the user see which partition of a wide word the
// current address reaches.  All outputs are combinational.  Parameters
// default to record WORD_EXT of the example test interface.
//
// Following the standard: the put/get data, per-bit enable, read/write
// enable and save signals of a word record; registered records give no write
// information.  This design's own choices: one module per copy gathers the
// separate functions, and cur_out is its reading of the merged current value
// (bus data where written, external data elsewhere).
module ii_word_conn
  import ii_pkg::*;
#(
  parameter int            II_ADDR_WIDTH = 4,
  parameter int            II_DATA_WIDTH = 4,
  parameter int            N_ITEMS       = II_TEST_N_ITEMS,
  parameter ii_decl_list_t DECL          = ii_test_decl(4, 8),
  parameter int            ID            = WORD_EXT,
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
  output logic [CW-1:0]      enable,
  output logic [CW-1:0]      read_ena,
  output logic [CW-1:0]      write_ena,
  output logic [CW-1:0]      save,
  output logic [CW-1:0]      cur_out
);

  localparam int WP = int'(TBL[IDX].wr_pos);
  localparam int RP = int'(TBL[IDX].rd_pos);
  localparam bit HAS_WR  = (TBL[IDX].item_type == VII_WORD) && (WP >= 0);
  localparam bit HAS_RD  = (TBL[IDX].item_type == VII_WORD) && (RP >= 0);
  localparam bit EXT_RD  = HAS_RD && (TBL[IDX].rd_type == VII_REXTERNAL);
  localparam bit INT_REG = TBL[IDX].rd_type == VII_RINTERNAL;
  localparam int OFF     = (POS < 0) ? 0 : POS * W;
  localparam int VW      = VEC_LEN + W * NUM;

  if (TBL[IDX].item_type != VII_WORD || POS < -1 || POS >= int'(TBL[IDX].number)) begin : g_bad
    $error("ii_word_conn: record %0d copy %0d is not a declared WORD", ID, POS);
  end

  logic [VW-1:0] all_w, ena_w;
  assign all_w = VW'(vec_all);
  assign ena_w = VW'(vec_ena);

  if (HAS_WR) begin : g_wr
    assign data_out  = all_w[WP + OFF +: CW];
    assign write_ena = INT_REG ? '0 : ena_w[WP + OFF +: CW];
  end else begin : g_no_wr
    assign data_out  = '0;
    assign write_ena = '0;
  end

  if (HAS_RD) begin : g_rd
    assign read_ena = ena_w[RP + OFF +: CW];
  end else begin : g_no_rd
    assign read_ena = '0;
  end

  if (EXT_RD) begin : g_put
    assign put_vec = VEC_LEN'(VW'(data_in) << (RP + OFF));
  end else begin : g_no_put
    assign put_vec = '0;
  end

  assign enable = II_writeN ? read_ena : write_ena;
  assign save   = write_ena & {CW{~II_strobeN}};
  assign cur_out = INT_REG ? data_out : (write_ena & data_out) | (~write_ena & data_in);

endmodule
