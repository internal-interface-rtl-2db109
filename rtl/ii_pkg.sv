// ii_pkg - types and elaboration-time functions of the Internal Interface (II).
//
// The II is a register/memory access interface whose whole address map is
// derived from a list of declarations.  A design declares records (pages,
// words, bit vectors, bit fields and memory areas) with their widths,
// repetition counts, parent groups and access rights; ii_build() turns that
// list, together with the physical bus widths, into an implementation table
// that fixes for every record
//   * its base address and address length on the II bus,
//   * where its write and read data sit in one flat "interface vector".
// All II modules take the declaration list as a parameter and call
// ii_build() themselves, so changing the bus widths re-lays the address map
// without touching the declarations.
//
// The layout rules follow the II standard:
//   * WORD records are cut into bus-wide partitions, least significant part
//     at the lowest address; the ItemNumber copies follow one another.
//   * BITS records are packed from bit 0 upwards into the data words of their
//     VECT group, in declaration order; a record that does not fit in the rest
//     of a word starts the next word.  A BITS record wider than the bus is an
//     error.
//   * AREA records are split into bus-wide sub-areas.  The low address lines
//     select the cell, the lines above them the sub-area, and the whole block
//     is aligned to its power-of-two size.
//   * Every PAGE is laid out from address 0; the largest page sets the number
//     of low address lines per page, the lines above index the pages in
//     declaration order.
//   * Vector slots are given in declaration order: a writable record gets a
//     write slot, an externally read record a separate read slot, and an
//     internally read (registered) record reads back its own write slot.
//     A WORD/BITS slot is ItemWidth*ItemNumber bits; an AREA slot is
//     min(ItemWidth, bus width) bits, because only one sub-area is on the bus
//     at a time.
// Choices of this implementation: numeric record fields are 16 bits wide, a
// list holds at most II_MAX_ITEMS records, the descriptive fields of a record
// (name, functional type, description) are not carried because they have no
// effect on hardware, and the check code is a plain sum of the table (see
// ii_check_code).
package ii_pkg;

  localparam int II_MAX_ITEMS = 32;

  typedef enum logic [2:0] {
    VII_PAGE,
    VII_AREA,
    VII_WORD,
    VII_VECT,
    VII_BITS
  } ii_item_type_e;

  typedef enum logic {
    VII_WNOACCESS,
    VII_WACCESS
  } ii_wr_type_e;

  typedef enum logic [1:0] {
    VII_RNOACCESS,
    VII_REXTERNAL,
    VII_RINTERNAL
  } ii_rd_type_e;

  // One record of the declaration list.
  typedef struct packed {
    ii_item_type_e item_type;
    logic [15:0]   id;
    logic [15:0]   width;
    logic [15:0]   number;
    logic [15:0]   parent;
    ii_wr_type_e   wr_type;
    ii_rd_type_e   rd_type;
  } ii_decl_t;

  typedef ii_decl_t [II_MAX_ITEMS-1:0] ii_decl_list_t;

  // One record of the implementation table.  Positions are -1 when the
  // record has no such slot.  addr_len is the number of addresses of one
  // WORD copy, the number of sub-areas of an AREA, or the bit offset of a
  // BITS record inside its data word.  cell_bits is the number of address
  // lines that select an AREA cell.
  typedef struct packed {
    ii_item_type_e      item_type;
    logic [15:0]        id;
    logic [15:0]        width;
    logic [15:0]        number;
    ii_wr_type_e        wr_type;
    logic signed [31:0] wr_pos;
    ii_rd_type_e        rd_type;
    logic signed [31:0] rd_pos;
    logic signed [31:0] addr_pos;
    logic signed [31:0] addr_len;
    logic [7:0]         cell_bits;
  } ii_item_t;

  // Entries 0..n-1 mirror the declaration list; entry II_MAX_ITEMS is the
  // interface record: width = data bus width, number = address bus width,
  // addr_pos = interface vector length, addr_len = highest address in use.
  typedef ii_item_t [II_MAX_ITEMS:0] ii_table_t;

  // Record identifiers of the example test interface.
  localparam int PAGE_REG  = 1;
  localparam int PAGE_AREA = 2;
  localparam int WORD_CHK  = 3;
  localparam int WORD_STAT = 4;
  localparam int WORD_INT  = 5;
  localparam int WORD_EXT  = 6;
  localparam int VECT_INT  = 7;
  localparam int BITS_INT1 = 8;
  localparam int BITS_INT2 = 9;
  localparam int VECT_EXT  = 10;
  localparam int BITS_EXT1 = 11;
  localparam int BITS_EXT2 = 12;
  localparam int AREA_EXT  = 13;
  localparam int II_TEST_N_ITEMS = 13;

  function automatic int ii_min(int a, int b);
    return (a < b) ? a : b;
  endfunction

  function automatic int ii_cdiv(int a, int b);
    return (a + b - 1) / b;
  endfunction

  function automatic int ii_clog2(int v);
    int r = 0;
    while ((1 << r) < v) r++;
    return r;
  endfunction

  function automatic ii_decl_t ii_decl(ii_item_type_e t, int id, int width, int number,
                                       int parent, ii_wr_type_e wr, ii_rd_type_e rd);
    ii_decl_t d;
    d.item_type = t;
    d.id        = 16'(id);
    d.width     = 16'(width);
    d.number    = 16'(number);
    d.parent    = 16'(parent);
    d.wr_type   = wr;
    d.rd_type   = rd;
    return d;
  endfunction

  function automatic bit ii_is_physical(ii_item_type_e t);
    return (t == VII_WORD) || (t == VII_BITS) || (t == VII_AREA);
  endfunction

  // Declaration list of the example test interface (13 records).
  function automatic ii_decl_list_t ii_test_decl(int data_w, int test_w);
    ii_decl_list_t l = '0;
    l[0]  = ii_decl(VII_PAGE, PAGE_REG,  0,      0, PAGE_REG,  VII_WNOACCESS, VII_RNOACCESS);
    l[1]  = ii_decl(VII_WORD, WORD_CHK,  data_w, 1, PAGE_REG,  VII_WNOACCESS, VII_REXTERNAL);
    l[2]  = ii_decl(VII_WORD, WORD_STAT, data_w, 1, PAGE_REG,  VII_WNOACCESS, VII_REXTERNAL);
    l[3]  = ii_decl(VII_WORD, WORD_INT,  data_w, 2, PAGE_REG,  VII_WACCESS,   VII_RINTERNAL);
    l[4]  = ii_decl(VII_WORD, WORD_EXT,  test_w, 1, PAGE_REG,  VII_WACCESS,   VII_REXTERNAL);
    l[5]  = ii_decl(VII_VECT, VECT_INT,  0,      0, PAGE_REG,  VII_WNOACCESS, VII_RNOACCESS);
    l[6]  = ii_decl(VII_BITS, BITS_INT1, 2,      1, VECT_INT,  VII_WACCESS,   VII_RINTERNAL);
    l[7]  = ii_decl(VII_BITS, BITS_INT2, 1,      1, VECT_INT,  VII_WACCESS,   VII_RINTERNAL);
    l[8]  = ii_decl(VII_VECT, VECT_EXT,  0,      0, PAGE_REG,  VII_WNOACCESS, VII_RNOACCESS);
    l[9]  = ii_decl(VII_BITS, BITS_EXT1, 1,      1, VECT_EXT,  VII_WACCESS,   VII_RNOACCESS);
    l[10] = ii_decl(VII_BITS, BITS_EXT2, 2,      1, VECT_EXT,  VII_WACCESS,   VII_REXTERNAL);
    l[11] = ii_decl(VII_PAGE, PAGE_AREA, 0,      0, PAGE_AREA, VII_WNOACCESS, VII_RNOACCESS);
    l[12] = ii_decl(VII_AREA, AREA_EXT,  test_w, 3, PAGE_AREA, VII_WACCESS,   VII_REXTERNAL);
    return l;
  endfunction

  // Builds the implementation table from a declaration list of n records.
  function automatic ii_table_t ii_build(ii_decl_list_t d, int n, int aw, int dw);
    ii_table_t t = '0;
    int        page_of[II_MAX_ITEMS];
    int        vpos    = 0;
    int        max_ext = 0;
    int        last_ext = 0;
    int        npages  = 0;
    int        pb;
    int        pi;
    for (int k = 0; k < II_MAX_ITEMS; k++) page_of[k] = -1;
    // Record copy and interface vector slots, in declaration order.
    for (int k = 0; k < n; k++) begin
      int size;
      t[k].item_type = d[k].item_type;
      t[k].id        = d[k].id;
      t[k].width     = d[k].width;
      t[k].number    = d[k].number;
      t[k].wr_type   = d[k].wr_type;
      t[k].rd_type   = d[k].rd_type;
      t[k].wr_pos    = -1;
      t[k].rd_pos    = -1;
      t[k].addr_pos  = -1;
      t[k].addr_len  = 0;
      t[k].cell_bits = 0;
      if (ii_is_physical(d[k].item_type)) begin
        size = (d[k].item_type == VII_AREA) ? ii_min(int'(d[k].width), dw)
                                            : int'(d[k].width) * int'(d[k].number);
        if (d[k].wr_type == VII_WACCESS) begin
          t[k].wr_pos = vpos;
          vpos += size;
        end
        if (d[k].rd_type == VII_RINTERNAL) begin
          t[k].rd_pos = t[k].wr_pos;
        end else if (d[k].rd_type == VII_REXTERNAL) begin
          t[k].rd_pos = vpos;
          vpos += size;
        end
      end
    end
    // Addresses inside each page, counted from 0.
    for (int p = 0; p < n; p++) begin
      if (d[p].item_type == VII_PAGE) begin
        int cur = 0;
        for (int j = 0; j < n; j++) begin
          if (j != p && d[j].parent == d[p].id) begin
            case (d[j].item_type)
              VII_WORD: begin
                t[j].addr_len = ii_cdiv(int'(d[j].width), dw);
                t[j].addr_pos = cur;
                page_of[j]    = npages;
                cur += int'(t[j].addr_len) * int'(d[j].number);
              end
              VII_AREA: begin
                int s, ca, sa, blk;
                s  = ii_cdiv(int'(d[j].width), dw);
                ca = ii_clog2(int'(d[j].number));
                sa = ii_clog2(s);
                blk = 1 << (ca + sa);
                t[j].addr_pos  = ii_cdiv(cur, blk) * blk;
                t[j].addr_len  = s;
                t[j].cell_bits = 8'(ca);
                page_of[j]     = npages;
                cur = int'(t[j].addr_pos) + blk;
              end
              VII_VECT: begin
                int bitp = 0;
                bit any = 0;
                t[j].addr_pos = cur;
                page_of[j]    = npages;
                for (int m = 0; m < n; m++) begin
                  if (d[m].item_type == VII_BITS && d[m].parent == d[j].id) begin
                    int tot;
                    tot = int'(d[m].width) * int'(d[m].number);
                    if (bitp + tot > dw) begin
                      cur++;
                      bitp = 0;
                    end
                    t[m].addr_pos = cur;
                    t[m].addr_len = bitp;
                    page_of[m]    = npages;
                    bitp += tot;
                    any = 1;
                  end
                end
                if (any) cur++;
              end
              default: ;
            endcase
          end
        end
        if (cur > max_ext) max_ext = cur;
        last_ext = cur;
        npages++;
      end
    end
    // Page index on the address lines above the largest page.
    pb = ii_clog2(max_ext);
    for (int k = 0; k < n; k++) begin
      if (page_of[k] >= 0) t[k].addr_pos = t[k].addr_pos + (page_of[k] << pb);
    end
    pi = (npages > 0) ? npages - 1 : 0;
    t[II_MAX_ITEMS].item_type = VII_PAGE;
    t[II_MAX_ITEMS].width     = 16'(dw);
    t[II_MAX_ITEMS].number    = 16'(aw);
    t[II_MAX_ITEMS].wr_pos    = -1;
    t[II_MAX_ITEMS].rd_pos    = -1;
    t[II_MAX_ITEMS].addr_pos  = vpos;
    t[II_MAX_ITEMS].addr_len  = (pi << pb) + last_ext - 1;
    return t;
  endfunction

  // Non-zero when the list cannot be implemented:
  //   1 a BITS record is wider than the data bus,
  //   2 the pages do not fit in the address space,
  //   3 internal reading is declared without write access,
  //   4 an AREA is declared with internal reading (areas are external memory).
  function automatic int ii_table_error(ii_decl_list_t d, int n, int aw, int dw);
    ii_table_t t;
    for (int k = 0; k < n; k++) begin
      if (d[k].item_type == VII_BITS && int'(d[k].width) * int'(d[k].number) > dw) return 1;
      if (ii_is_physical(d[k].item_type) && d[k].rd_type == VII_RINTERNAL &&
          d[k].wr_type != VII_WACCESS) return 3;
      if (d[k].item_type == VII_AREA && d[k].rd_type == VII_RINTERNAL) return 4;
    end
    t = ii_build(d, n, aw, dw);
    if (int'(t[II_MAX_ITEMS].addr_len) >= (1 << aw)) return 2;
    return 0;
  endfunction

  function automatic int ii_vec_len(ii_table_t t);
    return (t[II_MAX_ITEMS].addr_pos > 0) ? int'(t[II_MAX_ITEMS].addr_pos) : 1;
  endfunction

  // Index in the list of the record with identifier id, 0 if absent.
  function automatic int ii_find(ii_decl_list_t d, int n, int id);
    for (int k = 0; k < n; k++) if (int'(d[k].id) == id) return k;
    return 0;
  endfunction

  // Check sum of an implementation table: the sum of identifier, sizes,
  // access types, slot positions and addresses of every physical record,
  // plus the bus widths and vector length of the interface record.
  function automatic int ii_check_sum(ii_table_t t, int n);
    int s = 0;
    for (int k = 0; k < n; k++) begin
      if (ii_is_physical(t[k].item_type)) begin
        s += int'(t[k].id) + int'(t[k].width) + int'(t[k].number);
        s += int'(t[k].wr_type) + int'(t[k].rd_type);
        s += int'(t[k].wr_pos) + int'(t[k].rd_pos);
        s += int'(t[k].addr_pos) + int'(t[k].addr_len);
      end
    end
    s += int'(t[II_MAX_ITEMS].width) + int'(t[II_MAX_ITEMS].number);
    s += int'(t[II_MAX_ITEMS].addr_pos) + int'(t[II_MAX_ITEMS].addr_len);
    return s;
  endfunction

  // Check code: the check sum reduced to the data bus width.
  function automatic logic [31:0] ii_check_code(ii_table_t t, int n, int dw);
    logic [31:0] s;
    s = 32'(ii_check_sum(t, n));
    return s & ((32'd1 << dw) - 32'd1);
  endfunction

  // Where address addr falls inside physical record e, for data bus width dw:
  // hit, bit offset lo inside the record's slot, number of bits nb on the bus
  // and their offset dsh on the data bus.
  typedef struct packed {
    logic        hit;
    logic [31:0] lo;
    logic [31:0] nb;
    logic [31:0] dsh;
  } ii_loc_t;

  function automatic ii_loc_t ii_locate(ii_item_t e, int addr, int dw);
    ii_loc_t r = '0;
    int off, idx, p, s, base;
    case (e.item_type)
      VII_WORD: begin
        off = addr - int'(e.addr_pos);
        if (e.addr_len > 0 && off >= 0 && off < int'(e.number) * int'(e.addr_len)) begin
          idx   = off / int'(e.addr_len);
          p     = off % int'(e.addr_len);
          r.hit = 1'b1;
          r.lo  = 32'(idx * int'(e.width) + p * dw);
          r.nb  = 32'(ii_min(dw, int'(e.width) - p * dw));
        end
      end
      VII_BITS: begin
        if (addr == int'(e.addr_pos)) begin
          r.hit = 1'b1;
          r.nb  = 32'(int'(e.width) * int'(e.number));
          r.dsh = 32'(e.addr_len);
        end
      end
      VII_AREA: begin
        base = int'(e.addr_pos) >> e.cell_bits;
        s    = (addr >> e.cell_bits) - base;
        if (s >= 0 && s < int'(e.addr_len)) begin
          r.hit = 1'b1;
          r.nb  = 32'(ii_min(dw, int'(e.width) - s * dw));
        end
      end
      default: ;
    endcase
    return r;
  endfunction

endpackage
