// ii_system_tb - end-to-end test of controller, bus and test interface at
// the default sizes (4 address lines, 4 data lines, 8-bit test words).
//
// The testbench is the host and the user logic around the peripheral:
//   * an external 8-bit register behind WORD_EXT, loaded bit by bit while
//     word_ext0_save_out is set and fed back on word_ext0_data_in,
//   * an external 2-bit register behind BITS_EXT2, loaded while
//     bits_ext2_save_out is set,
//   * a 3 x 8-bit memory behind AREA_EXT, addressed by the low two II
//     address lines (cell) and line 2 (nibble), written from the bus during
//     area_strobe_out in write cycles and read combinationally.
// It writes every address with data 3*a+15 mod 16, reads every address back,
// then runs random traffic, then resets the bus and reads again.  Each read
// is compared with a reference model of the address map.  Every mechanism of
// the interface is counted and must occur: internal register write, write
// without write right, external save window for each half of WORD_EXT,
// external read, packed bit-field read, read of a write-only field, memory
// write strobe, memory read strobe, peripheral driving the shared bus,
// asynchronous reset.  Each access must take 14 clocks.
//
// The data pattern follows the standard's example simulation; the external
// register and memory models, random traffic and 14-clock access time belong
// to this design.
module ii_system_tb;
  int checks = 0, failures = 0;

  task automatic chk(string what, logic [63:0] got, logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  logic clk = 0;
  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic       rst_n, req, we, busy, done;
  logic [3:0] addr, wdata, rdata;
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
  logic       bus_resetN, bus_operN, bus_writeN, bus_strobeN;
  logic [3:0] bus_addr, bus_data;

  ii_system dut (.*);

  // ---------------------------------------------------------- user logic
  logic [7:0] ext_reg;
  logic [1:0] ext2_reg;
  logic [7:0] mem[3];

  assign word_ext0_data_in = ext_reg;
  assign bits_ext2_data_in = ext2_reg;
  assign area_data_in = (bus_addr[1:0] < 2'd3) ?
                        (bus_addr[2] ? mem[bus_addr[1:0]][7:4] : mem[bus_addr[1:0]][3:0]) : 4'h0;

  int n_int_wr, n_nowr, n_save_lo, n_save_hi, n_ext_rd, n_bits_rd, n_wo_rd;
  int n_area_wr, n_area_rd, n_drive, n_reset;

  always @(posedge clk) begin
    for (int b = 0; b < 8; b++) if (word_ext0_save_out[b]) ext_reg[b] <= word_ext0_data_out[b];
    if (bits_ext2_save_out) ext2_reg <= bits_ext2_data_out;
    if (area_strobe_out && area_write_ena_out && bus_addr[1:0] < 2'd3) begin
      if (bus_addr[2]) mem[bus_addr[1:0]][7:4] <= bus_data;
      else             mem[bus_addr[1:0]][3:0] <= bus_data;
    end
  end

  // mechanism counters, sampled while the strobe is low
  logic strobe_seen;
  always @(posedge clk) begin
    if (!bus_strobeN && !strobe_seen) begin
      if (word_ext0_save_out == 8'h0F) n_save_lo++;
      if (word_ext0_save_out == 8'hF0) n_save_hi++;
      if (word_ext0_read_ena_out != 0) n_ext_rd++;
      if (area_strobe_out && area_write_ena_out) n_area_wr++;
      if (area_strobe_out && area_read_ena_out) n_area_rd++;
    end
    strobe_seen <= !bus_strobeN;
  end

  // ---------------------------------------------------------- reference
  logic [3:0] r_int0, r_int1;
  logic [1:0] r_b1;
  logic       r_b2;

  function automatic logic [3:0] expected_read(int a);
    case (a)
      0: return 4'hF;
      1: return 4'h6;
      2: return r_int0;
      3: return r_int1;
      4: return ext_reg[3:0];
      5: return ext_reg[7:4];
      6: return {1'b0, r_b2, r_b1};
      7: return {1'b0, ext2_reg, 1'b0};
      default: return (a[1:0] < 2'd3) ? (a[2] ? mem[a[1:0]][7:4] : mem[a[1:0]][3:0]) : 4'h0;
    endcase
  endfunction

  task automatic access(bit w, int a, logic [3:0] d);
    int t = 0;
    logic [3:0] e;
    @(negedge clk);
    req = 1; we = w; addr = 4'(a); wdata = d;
    @(posedge clk);
    #1 req = 0;
    e = expected_read(a);
    while (!done) begin
      @(posedge clk);
      t++;
      #1;
      if (!bus_operN && bus_writeN) begin
        chk("peripheral drives bus", 64'(bus_data), 64'(expected_read(a)));
      end
    end
    chk("access clocks", 64'(t + 1), 14);
    if (w) begin
      if (a == 2) begin r_int0 = d; n_int_wr++; end
      if (a == 3) begin r_int1 = d; n_int_wr++; end
      if (a == 6) begin r_b1 = d[1:0]; r_b2 = d[2]; n_int_wr++; end
      if (a < 2) n_nowr++;
    end else begin
      chk($sformatf("read %0d", a), 64'(rdata), 64'(e));
      if (a >= 8 || a == 4 || a == 5 || a == 7 || a < 2) n_drive++;
      if (a == 6) n_bits_rd++;
      if (a == 7) begin
        n_wo_rd++;
        chk("write-only bit reads 0", 64'(rdata[0]), 0);
      end
    end
    chk("registers", 64'({word_int0_data_out, word_int1_data_out, bits_int1_data_out,
                          bits_int2_data_out}), 64'({r_int0, r_int1, r_b1, r_b2}));
  endtask

  initial begin
    rst_n = 0; req = 0; we = 0; addr = 0; wdata = 0;
    ext_reg = 8'h34; ext2_reg = 2'd1;
    mem = '{default: 8'h00};
    r_int0 = 0; r_int1 = 0; r_b1 = 0; r_b2 = 0;
    {n_int_wr, n_nowr, n_save_lo, n_save_hi, n_ext_rd, n_bits_rd, n_wo_rd} = '0;
    {n_area_wr, n_area_rd, n_drive, n_reset} = '0;
    strobe_seen = 0;
    repeat (4) @(posedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);
    for (int a = 0; a < 16; a++) access(1, a, 4'(3 * a + 15));
    chk("WORD_EXT loaded", 64'(ext_reg), 64'(8'hEB));
    chk("BITS_EXT2 loaded", 64'(ext2_reg), 2);
    for (int a = 0; a < 16; a++) access(0, a, 4'h0);
    for (int i = 0; i < 300; i++) access(1'($urandom), $urandom_range(15), 4'($urandom));
    // reset the bus: registered records clear, external ones keep their data
    rst_n = 0;
    repeat (2) @(posedge clk);
    #1 chk("bus reset", 64'(bus_resetN), 0);
    chk("registers cleared", 64'({word_int0_data_out, word_int1_data_out, bits_int1_data_out,
                                  bits_int2_data_out}), 0);
    r_int0 = 0; r_int1 = 0; r_b1 = 0; r_b2 = 0;
    n_reset++;
    rst_n = 1;
    repeat (2) @(posedge clk);
    for (int a = 0; a < 8; a++) access(0, a, 4'h0);

    chk("mechanism: internal register write", 64'(n_int_wr > 0), 1);
    chk("mechanism: write without right", 64'(n_nowr > 0), 1);
    chk("mechanism: save low half", 64'(n_save_lo > 0), 1);
    chk("mechanism: save high half", 64'(n_save_hi > 0), 1);
    chk("mechanism: external read", 64'(n_ext_rd > 0), 1);
    chk("mechanism: bit-field read", 64'(n_bits_rd > 0), 1);
    chk("mechanism: write-only read", 64'(n_wo_rd > 0), 1);
    chk("mechanism: memory write", 64'(n_area_wr > 0), 1);
    chk("mechanism: memory read", 64'(n_area_rd > 0), 1);
    chk("mechanism: peripheral drives bus", 64'(n_drive > 0), 1);
    chk("mechanism: reset", 64'(n_reset > 0), 1);
    $display("mechanisms: int_wr=%0d no_wr=%0d save_lo=%0d save_hi=%0d ext_rd=%0d bits_rd=%0d",
             n_int_wr, n_nowr, n_save_lo, n_save_hi, n_ext_rd, n_bits_rd);
    $display("            wo_rd=%0d area_wr=%0d area_rd=%0d drive=%0d reset=%0d",
             n_wo_rd, n_area_wr, n_area_rd, n_drive, n_reset);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
