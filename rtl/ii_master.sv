// ii_master - II bus controller: runs one access cycle per host request.
//
// The controller turns a synchronous request (address, write flag, write
// data) into the asynchronous eight-step II access cycle:
//   1  address, write data and II_writeN are set up (SETUP, T12 clocks),
//   2  II_operN falls (OPER, T23 clocks),
//   3  II_strobeN falls: the peripheral may latch the address (STROBE,
//      T35 clocks; read data appears on the bus during this phase),
//   5  II_strobeN rises: registers in the peripheral take write data
//      (HOLD, T56 clocks; read data is sampled at the end of this phase),
//   6  II_operN rises, the peripheral releases the data bus (RELEASE,
//      T68 clocks),
//   8  II_writeN returns high and done pulses for one clock.
// Steps 4 and 7 are the peripheral's responses.  With the default 100 MHz
// clock the phase lengths are 30, 20, 30, 30 and 20 ns, at or above the
// delays the standard suggests; a cycle takes 1+T12+T23+T35+T56+T68 clocks
// from the request to done.  The controller drives the data bus (data_oe)
// only in write cycles, from step 1 to step 8.  II_resetN is rst_n delayed
// by one clock.
//
// Host side: assert req with we/addr/wdata while busy is low; the request is
// taken in that clock.  rdata holds the last read result.  All outputs are
// registered.  The phase lengths and the clock are this design's choices.
module ii_master #(
  parameter int II_ADDR_WIDTH = 4,
  parameter int II_DATA_WIDTH = 4,
  parameter int T12 = 3,
  parameter int T23 = 2,
  parameter int T35 = 3,
  parameter int T56 = 3,
  parameter int T68 = 2
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     req,
  input  logic                     we,
  input  logic [II_ADDR_WIDTH-1:0] addr,
  input  logic [II_DATA_WIDTH-1:0] wdata,
  output logic                     busy,
  output logic                     done,
  output logic [II_DATA_WIDTH-1:0] rdata,
  output logic                     II_resetN,
  output logic                     II_operN,
  output logic                     II_writeN,
  output logic                     II_strobeN,
  output logic [II_ADDR_WIDTH-1:0] II_addr,
  output logic [II_DATA_WIDTH-1:0] data_o,
  output logic                     data_oe,
  input  logic [II_DATA_WIDTH-1:0] data_i
);

  typedef enum logic [2:0] {IDLE, SETUP, OPER, STROBE, HOLD, RELEASE} state_e;

  state_e      state;
  logic [7:0]  cnt;

  function automatic logic [7:0] len(int t);
    return (t > 1) ? 8'(t - 1) : 8'd0;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= IDLE;
      cnt        <= '0;
      busy       <= 1'b0;
      done       <= 1'b0;
      rdata      <= '0;
      II_resetN  <= 1'b0;
      II_operN   <= 1'b1;
      II_writeN  <= 1'b1;
      II_strobeN <= 1'b1;
      II_addr    <= '0;
      data_o     <= '0;
      data_oe    <= 1'b0;
    end else begin
      II_resetN <= 1'b1;
      done      <= 1'b0;
      if (cnt != 0) begin
        cnt <= cnt - 8'd1;
      end else begin
        unique case (state)
          IDLE: if (req) begin
            state     <= SETUP;
            cnt       <= len(T12);
            busy      <= 1'b1;
            II_addr   <= addr;
            II_writeN <= ~we;
            data_o    <= we ? wdata : '0;
            data_oe   <= we;
          end
          SETUP: begin
            state    <= OPER;
            cnt      <= len(T23);
            II_operN <= 1'b0;
          end
          OPER: begin
            state      <= STROBE;
            cnt        <= len(T35);
            II_strobeN <= 1'b0;
          end
          STROBE: begin
            state      <= HOLD;
            cnt        <= len(T56);
            II_strobeN <= 1'b1;
          end
          HOLD: begin
            state    <= RELEASE;
            cnt      <= len(T68);
            II_operN <= 1'b1;
            if (II_writeN) rdata <= data_i;
          end
          RELEASE: begin
            state     <= IDLE;
            busy      <= 1'b0;
            done      <= 1'b1;
            II_writeN <= 1'b1;
            data_oe   <= 1'b0;
            data_o    <= '0;
          end
          default: state <= IDLE;
        endcase
      end
    end
  end

  // The strobe only falls inside an operation, and the direction only
  // changes while no operation is running.
  a_strobe_in_oper: assert property (@(posedge clk) disable iff (!rst_n)
    !II_strobeN |-> !II_operN);
  a_dir_stable: assert property (@(posedge clk) disable iff (!rst_n)
    !II_operN |=> $stable(II_writeN) || II_operN);

endmodule
