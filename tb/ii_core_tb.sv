// ii_core_tb - self-checking test of the II service core and its table
// builder.
//
// Part 1 checks ii_build against the published layouts: the test interface
// table (vector slots, base addresses, address lengths, vector length 48,
// highest address 15), three 18-bit words on an 8-bit bus (3 addresses each),
// bit fields A/B/C packed into two words, a 20-bit x 3 memory placed after 7
// used addresses (base 16, 3 sub-areas), and pages of 5, 12 and 9 addresses
// on an 8-bit address bus (page bases 0, 16, 32).
// Part 2 drives the II bus of a core built for the test interface directly
// and checks registers, write retransmission, the access vector and the read
// multiplexer against the address map worked out by hand.
//
// The table values and the layout examples are those printed in the
// standard, except the AREA slot width and partition order, where the
// standard's tables are followed over its prose, and the check code, whose
// formula is this design's own.
module ii_core_tb;
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

  // ---------------------------------------------------------------- part 1
  task automatic check_tables();
    ii_table_t t;
    ii_decl_list_t l;
    // test interface, expected values of the published table
    int exp_wr[13] = '{-1, -1, -1, 8, 16, -1, 32, 34, -1, 35, 36, -1, 40};
    int exp_rd[13] = '{-1, 0, 4, 8, 24, -1, 32, 34, -1, -1, 38, -1, 44};
    int exp_ap[13] = '{-1, 0, 1, 2, 4, 6, 6, 6, 7, 7, 7, -1, 8};
    int exp_al[13] = '{0, 1, 1, 1, 2, 0, 0, 2, 0, 0, 1, 0, 2};
    t = ii_build(ii_test_decl(4, 8), II_TEST_N_ITEMS, 4, 4);
    for (int k = 0; k < II_TEST_N_ITEMS; k++) begin
      if (ii_is_physical(t[k].item_type)) begin
        chk($sformatf("tbl wr_pos %0d", k), 64'(t[k].wr_pos), 64'(exp_wr[k]));
        chk($sformatf("tbl rd_pos %0d", k), 64'(t[k].rd_pos), 64'(exp_rd[k]));
        chk($sformatf("tbl addr_pos %0d", k), 64'(t[k].addr_pos), 64'(exp_ap[k]));
        chk($sformatf("tbl addr_len %0d", k), 64'(t[k].addr_len), 64'(exp_al[k]));
      end
    end
    chk("vector length", 64'(t[II_MAX_ITEMS].addr_pos), 48);
    chk("highest address", 64'(t[II_MAX_ITEMS].addr_len), 15);
    chk("iface width", 64'(t[II_MAX_ITEMS].width), 4);
    chk("iface number", 64'(t[II_MAX_ITEMS].number), 4);
    chk("test list valid", 64'(ii_table_error(ii_test_decl(4, 8), II_TEST_N_ITEMS, 4, 4)), 0);

    // three 18-bit words on an 8-bit bus
    l = '0;
    l[0] = ii_decl(VII_PAGE, 1, 0, 0, 1, VII_WNOACCESS, VII_RNOACCESS);
    l[1] = ii_decl(VII_WORD, 2, 18, 3, 1, VII_WACCESS, VII_RINTERNAL);
    t = ii_build(l, 2, 8, 8);
    chk("w18 addr_len", 64'(t[1].addr_len), 3);
    chk("w18 highest", 64'(t[II_MAX_ITEMS].addr_len), 8);
    chk("w18 W1 at 3", 64'(ii_locate(t[1], 3, 8).lo), 18);
    chk("w18 W2 top part nb", 64'(ii_locate(t[1], 8, 8).nb), 2);
    chk("w18 W2 top part lo", 64'(ii_locate(t[1], 8, 8).lo), 52);

    // bit fields A (2x3), B (1), C (4x2) on an 8-bit bus
    l = '0;
    l[0] = ii_decl(VII_PAGE, 1, 0, 0, 1, VII_WNOACCESS, VII_RNOACCESS);
    l[1] = ii_decl(VII_VECT, 2, 0, 0, 1, VII_WNOACCESS, VII_RNOACCESS);
    l[2] = ii_decl(VII_BITS, 3, 2, 3, 2, VII_WACCESS, VII_RINTERNAL);
    l[3] = ii_decl(VII_BITS, 4, 1, 1, 2, VII_WACCESS, VII_RINTERNAL);
    l[4] = ii_decl(VII_BITS, 5, 4, 2, 2, VII_WACCESS, VII_RINTERNAL);
    t = ii_build(l, 5, 8, 8);
    chk("bits A addr", 64'(t[2].addr_pos), 0);
    chk("bits B addr", 64'(t[3].addr_pos), 0);
    chk("bits B bit", 64'(t[3].addr_len), 6);
    chk("bits C addr", 64'(t[4].addr_pos), 1);
    chk("bits C bit", 64'(t[4].addr_len), 0);
    l[4] = ii_decl(VII_BITS, 5, 4, 3, 2, VII_WACCESS, VII_RINTERNAL);
    chk("bits too wide", 64'(ii_table_error(l, 5, 8, 8)), 1);

    // 20-bit x 3 memory after 7 used addresses
    l = '0;
    l[0] = ii_decl(VII_PAGE, 1, 0, 0, 1, VII_WNOACCESS, VII_RNOACCESS);
    l[1] = ii_decl(VII_WORD, 2, 8, 7, 1, VII_WACCESS, VII_RINTERNAL);
    l[2] = ii_decl(VII_AREA, 3, 20, 3, 1, VII_WACCESS, VII_REXTERNAL);
    t = ii_build(l, 3, 8, 8);
    chk("area base", 64'(t[2].addr_pos), 16);
    chk("area subareas", 64'(t[2].addr_len), 3);
    chk("area cell lines", 64'(t[2].cell_bits), 2);
    chk("area sub B hit", 64'(ii_locate(t[2], 21, 8).hit), 1);
    chk("area sub C width", 64'(ii_locate(t[2], 25, 8).nb), 4);
    chk("area past end", 64'(ii_locate(t[2], 28, 8).hit), 0);
    chk("area reserved", 64'(ii_locate(t[2], 15, 8).hit), 0);

    // pages of 5, 12 and 9 addresses, 8 address lines
    l = '0;
    l[0] = ii_decl(VII_PAGE, 1, 0, 0, 1, VII_WNOACCESS, VII_RNOACCESS);
    l[1] = ii_decl(VII_WORD, 2, 8, 5, 1, VII_WACCESS, VII_RINTERNAL);
    l[2] = ii_decl(VII_PAGE, 3, 0, 0, 3, VII_WNOACCESS, VII_RNOACCESS);
    l[3] = ii_decl(VII_WORD, 4, 8, 12, 3, VII_WACCESS, VII_RINTERNAL);
    l[4] = ii_decl(VII_PAGE, 5, 0, 0, 5, VII_WNOACCESS, VII_RNOACCESS);
    l[5] = ii_decl(VII_WORD, 6, 8, 9, 5, VII_WACCESS, VII_RINTERNAL);
    t = ii_build(l, 6, 8, 8);
    chk("page P1", 64'(t[1].addr_pos), 0);
    chk("page P2", 64'(t[3].addr_pos), 16);
    chk("page P3", 64'(t[5].addr_pos), 32);
    chk("pages fit", 64'(ii_table_error(l, 6, 8, 8)), 0);
    chk("pages overflow 5 lines", 64'(ii_table_error(l, 6, 5, 8)), 2);
  endtask

  // ---------------------------------------------------------------- part 2
  logic        resetN, operN, writeN, strobeN;
  logic [3:0]  addr, din, dout;
  logic [47:0] vext, vint, vall, vena;

  ii_core dut (
    .II_resetN(resetN), .II_operN(operN), .II_writeN(writeN), .II_strobeN(strobeN),
    .II_addr(addr), .II_data_in(din), .II_data_out(dout),
    .vec_ext(vext), .vec_int(vint), .vec_all(vall), .vec_ena(vena)
  );

  // expected write slot (bits) and read slot of each address
  function automatic logic [47:0] wmask(int a);
    case (a)
      2: return 48'hF << 8;
      3: return 48'hF << 12;
      4: return 48'hF << 16;
      5: return 48'hF << 20;
      6: return 48'h7 << 32;
      7: return 48'h7 << 35;
      default: return (a >= 8) ? (48'hF << 40) : 48'h0;
    endcase
  endfunction

  function automatic logic [3:0] wval(int a, logic [3:0] d);
    return (a == 6 || a == 7) ? {1'b0, d[2:0]} : d;
  endfunction

  function automatic logic [47:0] rmask(int a);
    case (a)
      0: return 48'hF;
      1: return 48'hF << 4;
      2: return 48'hF << 8;
      3: return 48'hF << 12;
      4: return 48'hF << 24;
      5: return 48'hF << 28;
      6: return 48'h7 << 32;
      7: return 48'h3 << 38;
      default: return 48'hF << 44;
    endcase
  endfunction

  logic [3:0]  regs[4];      // WORD_INT0, WORD_INT1, bits vector 6 (3 bits)
  logic [47:0] spread;

  task automatic bus_write(int a, logic [3:0] d);
    addr = 4'(a); din = d; writeN = 0;
    #10 operN = 0;
    #10 strobeN = 0;
    #5;
    // external records see the data in their write slot, registered ones not yet
    spread = (a >= 2 && a <= 3) ? 48'h0 :
             (a == 6) ? 48'h0 :
             (a == 7) ? (48'(d[2:0]) << 35) :
             (a == 4) ? (48'(d) << 16) : (a == 5) ? (48'(d) << 20) :
             (a >= 8) ? (48'(d) << 40) : 48'h0;
    chk($sformatf("wr %0d ext slot", a), 64'(48'(vall & ~vint & ~vext)), 64'(spread));
    chk($sformatf("wr %0d ena", a), 64'(vena),
        64'((a == 2 || a == 3 || a == 6) ? 48'h0 : wmask(a)));
    #10 strobeN = 1;
    #5;
    if (a == 2) regs[0] = d;
    if (a == 3) regs[1] = d;
    if (a == 6) regs[2] = {1'b0, d[2:0]};
    chk($sformatf("wr %0d regs", a), 64'(vint),
        64'({13'h0, regs[2][2:0], 16'h0, regs[1], regs[0], 8'h0}));
    #10 operN = 1;
    #5;
    chk($sformatf("wr %0d idle ena", a), 64'(vena), 0);
    chk($sformatf("wr %0d idle slot", a), 64'(48'(vall & ~vint & ~vext)), 0);
    writeN = 1;
    #10;
  endtask

  task automatic bus_read(int a, logic [3:0] noise);
    logic [3:0] e;
    addr = 4'(a); din = noise; writeN = 1;
    #10 operN = 0;
    #10 strobeN = 0;
    #5;
    case (a)
      0: e = vext[3:0];
      1: e = vext[7:4];
      2: e = regs[0];
      3: e = regs[1];
      4: e = vext[27:24];
      5: e = vext[31:28];
      6: e = regs[2];
      7: e = {1'b0, vext[39:38], 1'b0};
      default: e = vext[47:44];
    endcase
    chk($sformatf("rd %0d data", a), 64'(dout), 64'(e));
    chk($sformatf("rd %0d ena", a), 64'(vena), 64'(rmask(a)));
    #10 strobeN = 1;
    #5 chk($sformatf("rd %0d regs kept", a), 64'(vint),
           64'({13'h0, regs[2][2:0], 16'h0, regs[1], regs[0], 8'h0}));
    #10 operN = 1;
    #10;
  endtask

  initial begin
    check_tables();
    resetN = 1; operN = 1; writeN = 1; strobeN = 1; addr = 0; din = 0;
    #1 resetN = 0;  // a falling reset edge whatever the power-up value
    vext = '0;
    regs = '{default: 4'h0};
    #20 chk("reset clears", 64'(vint), 0);
    resetN = 1;
    // the write sequence of the published simulation: data 3*a+15 mod 16
    for (int a = 0; a < 16; a++) bus_write(a, 4'(3 * a + 15));
    // external read data in every read slot
    vext = 48'({4'h5, 2'b01, 14'h0, 8'h34, 16'h0, 4'h6, 4'hD});
    for (int a = 0; a < 16; a++) bus_read(a, 4'(a));
    // random traffic
    for (int i = 0; i < 200; i++) begin
      vext = 48'({$urandom, $urandom}) & 48'hF0C0_FF00_00FF;
      if ($urandom_range(1) != 0) bus_write($urandom_range(15), 4'($urandom));
      else                   bus_read($urandom_range(15), 4'($urandom));
    end
    // asynchronous reset
    resetN = 0;
    #5 chk("async reset", 64'(vint), 0);
    regs = '{default: 4'h0};
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
