// ii_area_conn - user-side connection of a VII_AREA (memory) record.
//
// An AREA is a memory block outside the interface: it takes its cell address
// from the low lines of II_addr and its write data straight from II_data_in,
// while the lines above the cell address choose which bus-wide sub-area (part
// of the memory word) the cycle reaches.  The interface only carries the read
// data of the addressed sub-area and tells the memory when it is accessed:
//   put_vec    the read data placed in the read slot, to be ORed into the
//              core's vec_ext.  The read data come from either of two inputs,
//              which are ORed (tie the unused one to 0):
//                data_in  the addressed sub-area, already selected by the
//                         user (one bus word, or the record width if
//                         narrower);
//                mdata_in the whole memory word (ItemWidth bits); the module
//                         picks the sub-area that the upper address lines
//                         select, the lowest partition for the lowest
//                         sub-area, and pads the last one with zeros.
//   read_ena   the area is being read,
//   write_ena  the area is being written,
//   enable     read_ena in a read cycle, write_ena in a write cycle,
//   strobe     enable while II_strobeN is low (clock window for the memory),
//   write_str  write_ena while II_strobeN is low,
//   read_str   read_ena while II_strobeN is low.
// All outputs are combinational.  The sub-area selection of mdata_in is a
// multiplexer over the partitions; the other outputs are gates on slices of
// the access vector, so most bits of put_vec are constant 0 by nature.
// Parameters default to record AREA_EXT of
// the example test interface.
//
// Following the standard: the enable, read/write enable and strobe signals of
// a memory record and its read-data put.  This design's own reading: the
// whole-word input with the sub-area chosen inside, and write_str/read_str
// as the two halves of the strobe window.
module ii_area_conn
  import ii_pkg::*;
#(
  parameter int            II_ADDR_WIDTH = 4,
  parameter int            II_DATA_WIDTH = 4,
  parameter int            N_ITEMS       = II_TEST_N_ITEMS,
  parameter ii_decl_list_t DECL          = ii_test_decl(4, 8),
  parameter int            ID            = AREA_EXT,
  localparam ii_table_t    TBL           = ii_build(DECL, N_ITEMS, II_ADDR_WIDTH, II_DATA_WIDTH),
  localparam int           VEC_LEN       = ii_vec_len(TBL),
  localparam int           IDX           = ii_find(DECL, N_ITEMS, ID),
  localparam int           SW            = (TBL[IDX].width > 0) ?
                                           ii_min(int'(TBL[IDX].width), II_DATA_WIDTH) : 1,
  localparam int           MW            = (TBL[IDX].width > 0) ? int'(TBL[IDX].width) : 1
) (
  input  logic [II_ADDR_WIDTH-1:0] II_addr,
  input  logic [MW-1:0]      mdata_in,
  input  logic [VEC_LEN-1:0] vec_ena,
  input  logic               II_writeN,
  input  logic               II_strobeN,
  input  logic [SW-1:0]      data_in,
  output logic [VEC_LEN-1:0] put_vec,
  output logic               enable,
  output logic               read_ena,
  output logic               write_ena,
  output logic               strobe,
  output logic               write_str,
  output logic               read_str
);

  localparam int WP = int'(TBL[IDX].wr_pos);
  localparam int RP = int'(TBL[IDX].rd_pos);
  localparam bit HAS_WR = (TBL[IDX].item_type == VII_AREA) && (WP >= 0);
  localparam bit HAS_RD = (TBL[IDX].item_type == VII_AREA) && (RP >= 0);
  localparam int VW     = VEC_LEN + SW;

  if (TBL[IDX].item_type != VII_AREA) begin : g_bad
    $error("ii_area_conn: record %0d is not a declared AREA", ID);
  end

  logic [VW-1:0] ena_w;
  assign ena_w = VW'(vec_ena);

  if (HAS_WR) begin : g_wr
    assign write_ena = |ena_w[WP +: SW];
  end else begin : g_no_wr
    assign write_ena = 1'b0;
  end

  // Sub-area of the whole memory word that the address selects.
  localparam int NSUB = int'(TBL[IDX].addr_len);
  localparam int CB   = int'(TBL[IDX].cell_bits);
  localparam int BASE = int'(TBL[IDX].addr_pos) >> CB;
  logic [SW-1:0] msel;
  always_comb begin
    logic [MW+SW-1:0] mw;
    mw   = (MW+SW)'(mdata_in);
    msel = '0;
    for (int k = 0; k < NSUB; k++) begin
      if ((int'(II_addr) >> CB) == BASE + k) msel = mw[k*II_DATA_WIDTH +: SW];
    end
  end

  if (HAS_RD) begin : g_rd
    assign read_ena = |ena_w[RP +: SW];
    assign put_vec  = VEC_LEN'(VW'(data_in | msel) << RP);
  end else begin : g_no_rd
    assign read_ena = 1'b0;
    assign put_vec  = '0;
  end

  assign enable    = II_writeN ? read_ena : write_ena;
  assign strobe    = enable & ~II_strobeN;
  assign write_str = write_ena & ~II_strobeN;
  assign read_str  = read_ena & ~II_strobeN;

endmodule
