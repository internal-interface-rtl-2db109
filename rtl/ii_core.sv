// ii_core - service logic of an Internal Interface (II) peripheral.
//
// The core builds the implementation table of its declaration list at
// elaboration (ii_pkg::ii_build) and serves the asynchronous II bus:
//   * Internal registers.  Records declared as internally read keep their
//     data in vec_int.  On the rising edge of II_strobeN, while II_operN and
//     II_writeN are low, the addressed part of those records takes the bits of
//     II_data_in.  II_resetN low clears them asynchronously.
//   * Write retransmission.  For writable records that are not registered
//     here, the addressed write slot of the interface vector carries
//     II_data_in for as long as II_operN is low; the external logic decides
//     when to take it (see the save/write-enable outputs of the ii_*_conn
//     modules).  The write slot follows the address and II_operN only, so it
//     also shows II_data_in during a read cycle; read and write channels are
//     independent.
//   * Access vector.  vec_ena marks with '1' the bits of the addressed record
//     that the current cycle reaches: write slots of external records during
//     a write, read slots during a read.  Registered records only signal read
//     access.
//   * Read multiplexer.  II_data_out always shows the read data of whatever
//     record the address selects, from vec_all, regardless of II_operN and
//     II_writeN; unused data bits and unreadable records give 0.
// vec_all = vec_int | write retransmission | vec_ext, where vec_ext is the OR
// of the data that external records put into their read slots.
//
// Interface: the II bus (active-low control lines, separate data in/out) and
// the three interface vectors of VEC_LEN bits.  Timing: vec_int changes on
// the rising edge of II_strobeN; everything else is combinational.
// Parameters default to the example test interface: 4 address lines, 4 data
// lines, the 13-record list of ii_pkg::ii_test_decl with 8-bit test words.
//
// Following the standard: register update on the rising strobe edge, the
// three vectors, asynchronous reset, and read data independent of
// II_operN/II_writeN.  This design's own reading where the standard's text
// is open: the write slot of an external record is gated by II_operN only,
// idle or unreadable addresses read 0 rather than high impedance, and the
// bits of vec_int that belong to no registered record are constant 0.
module ii_core
  import ii_pkg::*;
#(
  parameter int            II_ADDR_WIDTH = 4,
  parameter int            II_DATA_WIDTH = 4,
  parameter int            N_ITEMS       = II_TEST_N_ITEMS,
  parameter ii_decl_list_t DECL          = ii_test_decl(4, 8),
  localparam ii_table_t    TBL           = ii_build(DECL, N_ITEMS, II_ADDR_WIDTH, II_DATA_WIDTH),
  localparam int           VEC_LEN       = ii_vec_len(TBL)
) (
  input  logic                     II_resetN,
  input  logic                     II_operN,
  input  logic                     II_writeN,
  input  logic                     II_strobeN,
  input  logic [II_ADDR_WIDTH-1:0] II_addr,
  input  logic [II_DATA_WIDTH-1:0] II_data_in,
  output logic [II_DATA_WIDTH-1:0] II_data_out,
  input  logic [VEC_LEN-1:0]       vec_ext,
  output logic [VEC_LEN-1:0]       vec_int,
  output logic [VEC_LEN-1:0]       vec_all,
  output logic [VEC_LEN-1:0]       vec_ena
);

  localparam int DW = II_DATA_WIDTH;
  // Working vectors carry one bus width of padding so that a slot at the top
  // of the vector can be shifted in as a whole bus word.
  localparam int VW = VEC_LEN + DW;

  if (ii_table_error(DECL, N_ITEMS, II_ADDR_WIDTH, II_DATA_WIDTH) != 0) begin : g_bad_list
    $error("ii_core: declaration list cannot be implemented, code %0d",
           ii_table_error(DECL, N_ITEMS, II_ADDR_WIDTH, II_DATA_WIDTH));
  end

  // Bits of the vector that hold registered records; no other bit of
  // vec_int_q is ever written, so those are kept at 0.
  function automatic logic [VW-1:0] int_slots(ii_table_t t);
    logic [VW-1:0] r;
    r = '0;
    for (int k = 0; k < N_ITEMS; k++) begin
      if (ii_is_physical(t[k].item_type) && t[k].wr_type == VII_WACCESS &&
          t[k].rd_type == VII_RINTERNAL) begin
        for (int b = 0; b < int'(t[k].width) * int'(t[k].number); b++) begin
          r[int'(t[k].wr_pos) + b] = 1'b1;
        end
      end
    end
    return r;
  endfunction

  localparam logic [VW-1:0] INT_SLOTS = int_slots(TBL);

  logic [VW-1:0] place_data;   // II_data_in placed at the addressed write slot
  logic [VW-1:0] ext_wmask;    // addressed write slots of external records
  logic [VW-1:0] int_wmask;    // addressed write slots of registered records
  logic [VW-1:0] rd_mask;      // addressed read slots
  logic [VW-1:0] vec_int_q;
  logic [VW-1:0] vec_all_w;

  // Address decode: which slot bits the current address reaches.
  always_comb begin
    place_data = '0;
    ext_wmask  = '0;
    int_wmask  = '0;
    rd_mask    = '0;
    for (int k = 0; k < N_ITEMS; k++) begin
      ii_loc_t       loc;
      logic [DW-1:0] m;
      logic [VW-1:0] mw;
      loc = ii_locate(TBL[k], int'(II_addr), DW);
      m   = DW'((64'd1 << loc.nb) - 64'd1);
      mw  = VW'(m) << (int'(TBL[k].wr_pos) + int'(loc.lo));
      if (ii_is_physical(TBL[k].item_type) && loc.hit) begin
        if (TBL[k].wr_type == VII_WACCESS) begin
          place_data |= ((VW'(II_data_in) >> loc.dsh) & VW'(m)) << (int'(TBL[k].wr_pos) + int'(loc.lo));
          if (TBL[k].rd_type == VII_RINTERNAL) int_wmask |= mw;
          else                                 ext_wmask |= mw;
        end
        if (TBL[k].rd_type != VII_RNOACCESS) begin
          rd_mask |= VW'(m) << (int'(TBL[k].rd_pos) + int'(loc.lo));
        end
      end
    end
  end

  // Internal registers, written at the end of a write cycle.
  always_ff @(posedge II_strobeN or negedge II_resetN) begin
    if (!II_resetN) begin
      vec_int_q <= '0;
    end else if (!II_operN && !II_writeN) begin
      vec_int_q <= ((vec_int_q & ~int_wmask) | (place_data & int_wmask)) & INT_SLOTS;
    end
  end

  assign vec_int   = vec_int_q[VEC_LEN-1:0];
  assign vec_all_w = vec_int_q
                   | (II_operN ? '0 : (place_data & ext_wmask))
                   | VW'(vec_ext);
  assign vec_all   = vec_all_w[VEC_LEN-1:0];
  assign vec_ena   = II_operN  ? '0
                   : II_writeN ? rd_mask[VEC_LEN-1:0]
                   :             ext_wmask[VEC_LEN-1:0];

  // Read multiplexer.
  always_comb begin
    II_data_out = '0;
    for (int k = 0; k < N_ITEMS; k++) begin
      ii_loc_t       loc;
      logic [DW-1:0] m;
      loc = ii_locate(TBL[k], int'(II_addr), DW);
      m   = DW'((64'd1 << loc.nb) - 64'd1);
      if (ii_is_physical(TBL[k].item_type) && loc.hit && TBL[k].rd_type != VII_RNOACCESS) begin
        II_data_out |= (DW'(vec_all_w >> (int'(TBL[k].rd_pos) + int'(loc.lo))) & m) << loc.dsh;
      end
    end
  end

endmodule
