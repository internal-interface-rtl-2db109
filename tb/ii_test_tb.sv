// ii_test_tb - replays the reference simulation of the test interface.
//
// The II bus is driven directly: a write cycle to every address 0..15 with
// data 3*a+15 mod 16, then a read cycle from every address with the same
// values on II_data_in.  External inputs: word_ext0_data_in = 34h,
// bits_ext2_data_in = 1, area_data_in random per cycle.  Checked in each
// phase (operation open, strobe low, after the strobe, idle): register
// contents, retransmitted write data, per-bit enables, save/strobe windows
// and II_data_out.  The expected check code, 0Fh, is the sum of the
// implementation table (639) modulo 16, worked out by hand.
//
// The data pattern, external input values and expected outputs follow the
// standard's example simulation; the check code value comes from this
// design's own formula.
module ii_test_tb;
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
    #100us;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [3:0] word_int0_data_out, word_int0_enable_out, word_int1_data_out, word_int1_enable_out;
  logic [7:0] word_ext0_data_in, word_ext0_data_out, word_ext0_enable_out;
  logic [7:0] word_ext0_read_ena_out, word_ext0_write_ena_out, word_ext0_save_out;
  logic [1:0] bits_int1_data_out, bits_ext2_data_in, bits_ext2_data_out;
  logic [0:0] bits_int2_data_out, bits_ext1_data_out;
  logic       bits_int1_enable_out, bits_int2_enable_out;
  logic       bits_ext2_enable_out, bits_ext2_read_ena_out, bits_ext2_write_ena_out;
  logic       bits_ext2_save_out;
  logic [3:0] area_data_in;
  logic       area_enable_out, area_read_ena_out, area_write_ena_out, area_strobe_out;
  logic       II_resetN, II_operN, II_writeN, II_strobeN;
  logic [3:0] II_addr, II_data_in, II_data_out;

  ii_test dut (.*);

  logic [3:0] r_int0, r_int1;
  logic [1:0] r_b1;
  logic       r_b2;

  // user outputs while the operation is open
  task automatic check_open(int a, bit wr, bit strobe_low, logic [3:0] d);
    string s;
    logic [7:0] e_wen, e_ren;
    logic [2:0] e_bext2, e_area;
    logic [7:0] e_ext;
    s = $sformatf("%s %0d%s", wr ? "wr" : "rd", a, strobe_low ? " strobe" : "");
    e_wen = (wr && a == 4) ? 8'h0F : (wr && a == 5) ? 8'hF0 : 8'h00;
    e_ren = (!wr && a == 4) ? 8'h0F : (!wr && a == 5) ? 8'hF0 : 8'h00;
    e_bext2 = (a == 7) ? (wr ? 3'b110 : 3'b101) : 3'b000;
    e_area  = (a >= 8) ? (wr ? 3'b110 : 3'b101) : 3'b000;
    e_ext   = (a == 4) ? {4'h0, d} : (a == 5) ? {d, 4'h0} : 8'h00;
    chk({s, " ext data"}, 64'(word_ext0_data_out),
        64'(e_ext));
    chk({s, " ext write_ena"}, 64'(word_ext0_write_ena_out), 64'(e_wen));
    chk({s, " ext read_ena"}, 64'(word_ext0_read_ena_out), 64'(e_ren));
    chk({s, " ext enable"}, 64'(word_ext0_enable_out), 64'(e_wen | e_ren));
    chk({s, " ext save"}, 64'(word_ext0_save_out), 64'(strobe_low ? e_wen : 8'h00));
    chk({s, " int0 enable"}, 64'(word_int0_enable_out), 64'((!wr && a == 2) ? 4'hF : 4'h0));
    chk({s, " int1 enable"}, 64'(word_int1_enable_out), 64'((!wr && a == 3) ? 4'hF : 4'h0));
    chk({s, " bint enables"}, 64'({bits_int1_enable_out, bits_int2_enable_out}),
        64'((!wr && a == 6) ? 2'b11 : 2'b00));
    chk({s, " bext2 data"}, 64'(bits_ext2_data_out), 64'((a == 7) ? d[2:1] : 2'b00));
    chk({s, " bext1 data"}, 64'(bits_ext1_data_out), 64'((a == 7) ? d[0] : 1'b0));
    chk({s, " bext2 enables"},
        64'({bits_ext2_enable_out, bits_ext2_write_ena_out, bits_ext2_read_ena_out}),
        64'(e_bext2));
    chk({s, " bext2 save"}, 64'(bits_ext2_save_out), 64'(wr && a == 7 && strobe_low));
    chk({s, " area enables"},
        64'({area_enable_out, area_write_ena_out, area_read_ena_out}),
        64'(e_area));
    chk({s, " area strobe"}, 64'(area_strobe_out), 64'(a >= 8 && strobe_low));
  endtask

  function automatic logic [3:0] expected_read(int a);
    case (a)
      0: return 4'hF;
      1: return 4'h6;
      2: return r_int0;
      3: return r_int1;
      4: return word_ext0_data_in[3:0];
      5: return word_ext0_data_in[7:4];
      6: return {1'b0, r_b2, r_b1};
      7: return {1'b0, bits_ext2_data_in, 1'b0};
      default: return area_data_in;
    endcase
  endfunction

  task automatic cycle(int a, bit wr, logic [3:0] d);
    II_addr = 4'(a); II_data_in = d; II_writeN = ~wr;
    area_data_in = 4'($urandom);
    #20 II_operN = 0;
    #5 check_open(a, wr, 0, d);
    #15 II_strobeN = 0;
    #5 check_open(a, wr, 1, d);
    chk($sformatf("data_out %0d", a), 64'(II_data_out), 64'(expected_read(a)));
    #20 II_strobeN = 1;
    if (wr) begin
      if (a == 2) r_int0 = d;
      if (a == 3) r_int1 = d;
      if (a == 6) begin r_b1 = d[1:0]; r_b2 = d[2]; end
    end
    #5;
    chk($sformatf("regs after %0d", a),
        64'({word_int0_data_out, word_int1_data_out, bits_int1_data_out, bits_int2_data_out}),
        64'({r_int0, r_int1, r_b1, r_b2}));
    #15 II_operN = 1;
    #5 check_open(-1, wr, 0, d);
    #15 II_writeN = 1;
  endtask

  initial begin
    II_resetN = 0; II_operN = 1; II_writeN = 1; II_strobeN = 1; II_addr = 4'hF;
    II_data_in = 0; word_ext0_data_in = 8'h34; bits_ext2_data_in = 2'd1; area_data_in = 0;
    r_int0 = 0; r_int1 = 0; r_b1 = 0; r_b2 = 0;
    // a falling reset edge whatever the power-up value
    #1 II_resetN = 1;
    #1 II_resetN = 0;
    #50 II_resetN = 1;
    for (int a = 0; a < 16; a++) cycle(a, 1, 4'(3 * a + 15));
    for (int a = 0; a < 16; a++) cycle(a, 0, 4'(3 * a + 15));
    // the values the reference simulation shows after the writes
    chk("int0 is 5", 64'(word_int0_data_out), 5);
    chk("int1 is 8", 64'(word_int1_data_out), 8);
    chk("bits_int1 is 1", 64'(bits_int1_data_out), 1);
    for (int i = 0; i < 100; i++) begin
      word_ext0_data_in = 8'($urandom);
      bits_ext2_data_in = 2'($urandom);
      cycle($urandom_range(15), 1'($urandom), 4'($urandom));
    end
    II_resetN = 0;
    #5 chk("reset", 64'({word_int0_data_out, word_int1_data_out, bits_int1_data_out,
                         bits_int2_data_out}), 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
