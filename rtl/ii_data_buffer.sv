// ii_data_buffer - direction control of the bidirectional II data bus.
//
// Inside the FPGA the II data bus is split into II_data_in and II_data_out;
// on the board it is one bidirectional bus II_data.  This block is the
// peripheral's side of that buffer: it drives the board bus with
// II_data_out only during a read cycle (II_operN low and II_writeN high) and
// otherwise leaves it to the controller, so the driver is opened by
// II_operN and its direction is set by II_writeN.  The pad is modelled in
// two-state form as an output value, an output enable and an input value, as
// FPGA I/O cells present it; the tri-state pad itself is not part of the
// block.  II_data_in follows the pad input at all times.  Purely
// combinational.  The enable rule follows the standard's bus description;
// the pad representation is this design's choice.
module ii_data_buffer #(
  parameter int II_DATA_WIDTH = 4
) (
  input  logic                     II_operN,
  input  logic                     II_writeN,
  input  logic [II_DATA_WIDTH-1:0] II_data_out,
  output logic [II_DATA_WIDTH-1:0] II_data_in,
  input  logic [II_DATA_WIDTH-1:0] pad_i,
  output logic [II_DATA_WIDTH-1:0] pad_o,
  output logic                     pad_oe
);

  assign pad_oe     = ~II_operN & II_writeN;
  assign pad_o      = pad_oe ? II_data_out : '0;
  assign II_data_in = pad_i;

endmodule
