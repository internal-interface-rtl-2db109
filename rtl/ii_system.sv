// ii_system - an II controller and the example II peripheral on one bus.
//
// A host issues register and memory accesses through ii_master, which plays
// the II bus protocol (address, II_operN, II_strobeN, II_writeN, shared data
// bus) towards the peripheral ii_test.  The peripheral's data pins go through
// ii_data_buffer, which drives the shared bus only in read cycles; the
// controller drives it only in write cycles.  The shared bus is modelled as
// a two-state wired bus: whichever side has its output enabled sets it, and
// it reads 0 when neither does.  An assertion checks that the two sides never
// drive at once.  The peripheral's pad input is taken from the controller's
// driver rather than from the merged bus, so it reads 0 instead of its own
// output during a read cycle; this keeps the model free of a combinational
// path from the peripheral's output back to its input.
//
// Ports: the host request interface (synchronous to clk), the user-side
// signals of every record of the test interface, and a copy of the II bus
// lines for observation.  Parameters are the standard's example: 4 address
// lines, 4 data lines, 8-bit test words.  One access takes
// 1+T12+T23+T35+T56+T68 = 14 clocks with the controller's default phases.
module ii_system
  import ii_pkg::*;
#(
  parameter int II_ADDR_WIDTH = 4,
  parameter int II_DATA_WIDTH = 4,
  parameter int TEST_WIDTH    = 8,
  localparam int AREA_W       = ii_min(TEST_WIDTH, II_DATA_WIDTH)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // host requests
  input  logic                     req,
  input  logic                     we,
  input  logic [II_ADDR_WIDTH-1:0] addr,
  input  logic [II_DATA_WIDTH-1:0] wdata,
  output logic                     busy,
  output logic                     done,
  output logic [II_DATA_WIDTH-1:0] rdata,
  // user side of the test interface records
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
  // II bus, for observation
  output logic                     bus_resetN,
  output logic                     bus_operN,
  output logic                     bus_writeN,
  output logic                     bus_strobeN,
  output logic [II_ADDR_WIDTH-1:0] bus_addr,
  output logic [II_DATA_WIDTH-1:0] bus_data
);

  localparam int AW = II_ADDR_WIDTH;
  localparam int DW = II_DATA_WIDTH;

  logic [DW-1:0] m_data_o, p_data_o, p_data_in, p_data_out;
  logic          m_data_oe, p_data_oe;

  ii_master #(.II_ADDR_WIDTH(AW), .II_DATA_WIDTH(DW)) u_master (
    .clk, .rst_n, .req, .we, .addr, .wdata, .busy, .done, .rdata,
    .II_resetN(bus_resetN), .II_operN(bus_operN), .II_writeN(bus_writeN),
    .II_strobeN(bus_strobeN), .II_addr(bus_addr),
    .data_o(m_data_o), .data_oe(m_data_oe), .data_i(bus_data)
  );

  // Shared data bus.
  assign bus_data = p_data_oe ? p_data_o : m_data_oe ? m_data_o : '0;

  ii_data_buffer #(.II_DATA_WIDTH(DW)) u_buffer (
    .II_operN(bus_operN), .II_writeN(bus_writeN), .II_data_out(p_data_out),
    .II_data_in(p_data_in), .pad_i(m_data_oe ? m_data_o : '0), .pad_o(p_data_o), .pad_oe(p_data_oe)
  );

  ii_test #(.II_ADDR_WIDTH(AW), .II_DATA_WIDTH(DW), .TEST_WIDTH(TEST_WIDTH)) u_periph (
    .word_int0_data_out, .word_int0_enable_out, .word_int1_data_out, .word_int1_enable_out,
    .word_ext0_data_in, .word_ext0_data_out, .word_ext0_enable_out, .word_ext0_read_ena_out,
    .word_ext0_write_ena_out, .word_ext0_save_out,
    .bits_int1_data_out, .bits_int1_enable_out, .bits_int2_data_out, .bits_int2_enable_out,
    .bits_ext1_data_out, .bits_ext2_data_in, .bits_ext2_data_out, .bits_ext2_enable_out,
    .bits_ext2_read_ena_out, .bits_ext2_write_ena_out, .bits_ext2_save_out,
    .area_data_in, .area_enable_out, .area_read_ena_out, .area_write_ena_out, .area_strobe_out,
    .II_resetN(bus_resetN), .II_operN(bus_operN), .II_writeN(bus_writeN),
    .II_strobeN(bus_strobeN), .II_addr(bus_addr), .II_data_in(p_data_in),
    .II_data_out(p_data_out)
  );

  a_no_contention: assert property (@(posedge clk) disable iff (!rst_n)
    !(p_data_oe && m_data_oe));

endmodule
