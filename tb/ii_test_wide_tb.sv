// ii_test_wide_tb - the example test interface rebuilt for an 8-bit data bus.
//
// The same 13-record declaration list is instantiated with II_DATA_WIDTH = 8
// (4 address lines, 8-bit test words), to show that the address map follows
// the bus width with no change to the list.  Worked out by hand for this
// width:
//   address 0 WORD_CHK, 1 WORD_STAT, 2/3 WORD_INT copies, 4 WORD_EXT (one
//   partition now), 5 VECT_INT (BITS_INT1 bits 1..0, BITS_INT2 bit 2),
//   6 VECT_EXT (BITS_EXT1 bit 0 write only, BITS_EXT2 bits 2..1); the
//   register page spans 7 addresses, so pages are 8 apart and the memory
//   AREA_EXT (3 cells, one sub-area, 2 cell lines) sits at 8..11; 7 and
//   12..15 reach nothing.  Highest address 11, vector length 72, and the
//   check sum of the table is 869, so the check code is 65h.
// The testbench models the external 8-bit register, the 2-bit field and the
// 3-cell memory, drives write and read cycles straight on the II bus (all
// addresses in order, then random traffic) and compares read data, register
// outputs, save windows and memory strobes with a reference model.
//
// The layout rules applied are the standard's; the expected values are this
// testbench's own arithmetic.
module ii_test_wide_tb;
  import ii_pkg::*;

  int checks = 0, failures = 0;

  task automatic chk(string what, logic [63:0] got, logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  initial begin : watchdog
    #200us;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [7:0] word_int0_data_out, word_int0_enable_out, word_int1_data_out, word_int1_enable_out;
  logic [7:0] word_ext0_data_in, word_ext0_data_out, word_ext0_enable_out;
  logic [7:0] word_ext0_read_ena_out, word_ext0_write_ena_out, word_ext0_save_out;
  logic [1:0] bits_int1_data_out, bits_ext2_data_in, bits_ext2_data_out;
  logic [0:0] bits_int2_data_out, bits_ext1_data_out;
  logic       bits_int1_enable_out, bits_int2_enable_out;
  logic       bits_ext2_enable_out, bits_ext2_read_ena_out, bits_ext2_write_ena_out;
  logic       bits_ext2_save_out;
  logic [7:0] area_data_in;
  logic       area_enable_out, area_read_ena_out, area_write_ena_out, area_strobe_out;
  logic       II_resetN, II_operN, II_writeN, II_strobeN;
  logic [3:0] II_addr;
  logic [7:0] II_data_in, II_data_out;

  ii_test #(.II_ADDR_WIDTH(4), .II_DATA_WIDTH(8), .TEST_WIDTH(8)) dut (.*);

  // external objects behind the interface
  logic [7:0] ext_reg;
  logic [1:0] bext2_reg;
  logic [7:0] mem [3];

  always @(posedge word_ext0_save_out[0] or posedge word_ext0_save_out[7])
    ext_reg <= word_ext0_data_out;
  always @(posedge bits_ext2_save_out) bext2_reg <= bits_ext2_data_out;
  always @(negedge II_strobeN)
    if (area_write_ena_out && II_addr[1:0] != 2'd3) mem[II_addr[1:0]] <= II_data_in;
  always_comb begin
    word_ext0_data_in = ext_reg;
    bits_ext2_data_in = bext2_reg;
    area_data_in      = (II_addr[1:0] == 2'd3) ? 8'h00 : mem[II_addr[1:0]];
  end

  // reference model
  logic [7:0] r_int0, r_int1, r_ext, r_mem [3];
  logic [1:0] r_b1, r_bext2;
  logic       r_b2;
  int n_save = 0, n_bsave = 0, n_mem_wr = 0, n_mem_rd = 0;

  function automatic logic [7:0] expected_read(int a);
    case (a)
      0: return 8'h65;
      1: return 8'h06;
      2: return r_int0;
      3: return r_int1;
      4: return r_ext;
      5: return {5'b0, r_b2, r_b1};
      6: return {5'b0, r_bext2, 1'b0};
      8, 9, 10: return r_mem[a - 8];
      default: return 8'h00;
    endcase
  endfunction

  function automatic logic [2:0] e3(bit hit, bit wr);
    return hit ? (wr ? 3'b110 : 3'b101) : 3'b000;
  endfunction

  task automatic cycle(int a, bit wr, logic [7:0] d);
    string s;
    logic [15:0] e16;
    e16 = (!wr && a == 2) ? 16'hFF00 : (!wr && a == 3) ? 16'h00FF : 16'h0000;
    s = $sformatf("%s %0d", wr ? "wr" : "rd", a);
    II_addr = 4'(a); II_data_in = d; II_writeN = ~wr;
    #20 II_operN = 0;
    // read data are checked before the strobe: in a write cycle the external
    // models take the new value as soon as the save window opens
    #15 chk({s, " data"}, 64'(II_data_out), 64'(expected_read(a)));
    chk({s, " ext write_ena"}, 64'(word_ext0_write_ena_out), 64'((wr && a == 4) ? 8'hFF : 8'h00));
    chk({s, " bext2 enables"},
        64'({bits_ext2_enable_out, bits_ext2_write_ena_out, bits_ext2_read_ena_out}),
        64'(e3(a == 6, wr)));
    chk({s, " ext enable"}, 64'(word_ext0_enable_out), 64'((a == 4) ? 8'hFF : 8'h00));
    chk({s, " area enables"}, 64'({area_enable_out, area_write_ena_out, area_read_ena_out}),
        64'(e3(a >= 8 && a <= 11, wr)));
    chk({s, " bext1 data"}, 64'(bits_ext1_data_out), 64'((a == 6) ? d[0] : 1'b0));
    #5 II_strobeN = 0;
    #5;
    chk({s, " ext save"}, 64'(word_ext0_save_out), 64'((wr && a == 4) ? 8'hFF : 8'h00));
    chk({s, " ext read_ena"}, 64'(word_ext0_read_ena_out), 64'((!wr && a == 4) ? 8'hFF : 8'h00));
    chk({s, " int enables"}, 64'({word_int0_enable_out, word_int1_enable_out}),
        64'(e16));
    chk({s, " bits_int enables"}, 64'({bits_int1_enable_out, bits_int2_enable_out}),
        64'((!wr && a == 5) ? 2'b11 : 2'b00));
    chk({s, " bext2 save"}, 64'(bits_ext2_save_out), 64'(wr && a == 6));
    chk({s, " area strobe"}, 64'(area_strobe_out), 64'(a >= 8 && a <= 11));
    chk({s, " area write_ena"}, 64'(area_write_ena_out), 64'(wr && a >= 8 && a <= 11));
    if (word_ext0_save_out != 0) n_save++;
    if (bits_ext2_save_out) n_bsave++;
    if (area_strobe_out && wr) n_mem_wr++;
    if (area_strobe_out && !wr) n_mem_rd++;
    #20 II_strobeN = 1;
    if (wr) begin
      case (a)
        2: r_int0 = d;
        3: r_int1 = d;
        4: r_ext  = d;
        5: begin r_b1 = d[1:0]; r_b2 = d[2]; end
        6: r_bext2 = d[2:1];
        8, 9, 10: r_mem[a - 8] = d;
        default: ;
      endcase
    end
    #5;
    chk({s, " registers"},
        64'({word_int0_data_out, word_int1_data_out, bits_int1_data_out, bits_int2_data_out}),
        64'({r_int0, r_int1, r_b1, r_b2}));
    #15 II_operN = 1;
    #20 II_writeN = 1;
  endtask

  initial begin
    II_resetN = 1; II_operN = 1; II_writeN = 1; II_strobeN = 1; II_addr = 0; II_data_in = 0;
    ext_reg = 0; bext2_reg = 0;
    for (int i = 0; i < 3; i++) begin mem[i] = 0; r_mem[i] = 0; end
    r_int0 = 0; r_int1 = 0; r_ext = 0; r_b1 = 0; r_b2 = 0; r_bext2 = 0;
    #1 II_resetN = 0;
    #50 II_resetN = 1;
    for (int a = 0; a < 16; a++) cycle(a, 1, 8'(37 * a + 11));
    for (int a = 0; a < 16; a++) cycle(a, 0, 8'($urandom));
    for (int i = 0; i < 300; i++) cycle($urandom_range(15), 1'($urandom), 8'($urandom));
    chk("mechanism: external save", 64'(n_save > 0), 1);
    chk("mechanism: bit-field save", 64'(n_bsave > 0), 1);
    chk("mechanism: memory write", 64'(n_mem_wr > 0), 1);
    chk("mechanism: memory read", 64'(n_mem_rd > 0), 1);
    II_resetN = 0;
    #5 chk("reset", 64'({word_int0_data_out, word_int1_data_out, bits_int1_data_out,
                         bits_int2_data_out}), 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
