// bram: 32 Kbit block RAM of the FPGA fabric, true dual port, with
// selectable geometry.
//
// The array is stored as DEPTH words of WIDTH bits (512 x 64 by default,
// 32 Kbit). The configuration input 'geom' selects the aspect ratio: the
// port width is WIDTH >> geom bits and the depth DEPTH << geom words, from
// 512 x 64 (geom = 0) down to 32768 x 1 (geom = 6). In a narrow geometry,
// address a selects word a >> geom and, within it, slice a mod 2**geom; read
// data is returned in the low bits of rdata (upper bits zero) and only the
// low bits of wdata are written. Both ports share the geometry, as a
// configuration bit of the FPGA would fix it for the whole block; using only
// one port gives the single-port mode. A geom above 6 acts as 6 (for WIDTH
// of 128 or more that clamp can never apply, and lint reports the comparison
// as constant).
//
// Both ports can read and write. A read returns the data stored before a
// write to the same address in the same cycle (read-first). If both ports
// write the same bits in one cycle, port 1 wins. One cycle read latency.
// The 32 Kbit size, the several geometries and the single/dual-port modes
// follow the fabric the matmul blocks are embedded in; the port behaviour
// details are this design's choices.
module bram #(
  parameter int unsigned WIDTH  = 64,             // widest geometry
  parameter int unsigned DEPTH  = 32768 / WIDTH,  // words in the widest geometry
  parameter int unsigned GEOM_W = 3,              // bits of 'geom'
  parameter int unsigned ADDR_W = $clog2(DEPTH) + $clog2(WIDTH)  // deepest geometry
) (
  input  logic              clk,
  input  logic [GEOM_W-1:0] geom,   // port width = WIDTH >> geom
  // port 1
  input  logic              en1,
  input  logic              we1,
  input  logic [ADDR_W-1:0] addr1,
  input  logic [WIDTH-1:0]  wdata1,
  output logic [WIDTH-1:0]  rdata1,
  // port 2
  input  logic              en2,
  input  logic              we2,
  input  logic [ADDR_W-1:0] addr2,
  input  logic [WIDTH-1:0]  wdata2,
  output logic [WIDTH-1:0]  rdata2
);

  localparam int unsigned WA = $clog2(DEPTH);   // word address bits
  localparam int unsigned SH = $clog2(WIDTH);   // log2 of the widest port

  logic [WIDTH-1:0] mem [DEPTH];

  // Word index, bit offset of the slice, and slice mask for one address.
  typedef struct packed {
    logic [WA-1:0]    word;
    logic [SH:0]      offset;
    logic [WIDTH-1:0] mask;
  } loc_t;

  function automatic loc_t locate(logic [ADDR_W-1:0] addr, logic [GEOM_W-1:0] g);
    loc_t l;
    logic [SH:0]       w;      // slice width
    logic [SH-1:0]     sub;    // slice index within the word
    logic [GEOM_W-1:0] gg;
    gg       = (g > GEOM_W'(SH)) ? GEOM_W'(SH) : g;   // narrowest is 1 bit
    w        = (SH+1)'(WIDTH >> gg);
    l.word   = WA'(addr >> gg);
    sub      = SH'(addr) & SH'((1 << gg) - 1);
    l.offset = (SH+1)'(sub) * w;
    l.mask   = (w == (SH+1)'(WIDTH)) ? '1 : ((WIDTH'(1) << w) - 1'b1);
    return l;
  endfunction

  loc_t l1, l2;
  assign l1 = locate(addr1, geom);
  assign l2 = locate(addr2, geom);

  logic [WIDTH-1:0] wbits1, wbits2, wmask1, wmask2;
  assign wmask1 = l1.mask << l1.offset;
  assign wmask2 = l2.mask << l2.offset;
  assign wbits1 = (wdata1 & l1.mask) << l1.offset;
  assign wbits2 = (wdata2 & l2.mask) << l2.offset;

  logic wr1, wr2, same_word;
  assign wr1       = en1 && we1;
  assign wr2       = en2 && we2;
  assign same_word = (l1.word == l2.word);

  always_ff @(posedge clk) begin
    if (en1) rdata1 <= (mem[l1.word] >> l1.offset) & l1.mask;
    if (en2) rdata2 <= (mem[l2.word] >> l2.offset) & l2.mask;
    if (wr2 && !(wr1 && same_word))
      mem[l2.word] <= (mem[l2.word] & ~wmask2) | wbits2;
    if (wr1) begin
      if (wr2 && same_word)   // both ports write one word: port 2 first, then port 1
        mem[l1.word] <= (((mem[l1.word] & ~wmask2) | wbits2) & ~wmask1) | wbits1;
      else
        mem[l1.word] <= (mem[l1.word] & ~wmask1) | wbits1;
    end
  end

endmodule
