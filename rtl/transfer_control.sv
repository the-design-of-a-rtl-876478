// transfer_control: the control flip-flops Q, H, N, R, Y and AK that carry
// out the document's write and read transfer equations.
//
// A transfer runs as follows. The DMA controller's control word sets Q; the
// next t0 (with H still clear) loads the address word into B and sets N and
// H. In the J-pulse window p2 at the end of the sector before the addressed
// one (F = B11 xor SC is then one), t2 copies the address into S, G and PT
// and clears N. A write then starts at the SP that opens the addressed
// sector (R set); each AP requests a word (AK = 1) and clears B, the
// DMA's answer (MRQ1B with t0) loads L(B) and drops AK, and each CP writes
// L(B) and P(B) to the drum; JP3 ends the write after 299 words. A read
// starts at JP1, just inside the addressed sector (Y set); each BP loads B
// from the drum, each CP raises AK, the DMA's answer takes L(B) on DMI, drops
// AK, clears B and folds the parity check into Z; the next JP1 ends it.
// The end clears Q, H, R/Y, S, G and PT, leaving the unit ready again.
//
// This design's own choices where the equations are damaged or silent:
// * AK = 1 means "requesting a word"; the prose of the document says so in
//   three places, while its equations print the opposite polarity.
// * The address equation is taken as H' . t0 . Q (H clear), otherwise it
//   could never fire from the all-zero starting state.
// * R and Y also require N clear (the address has been taken), following
//   the N-to-R and N-to-Y connections of the register diagram.
// * The read start tests "addressed sector under the heads" (S = SC), since
//   at JP1 SC already names the new sector; F itself is used unchanged for
//   the address step and the write start.
// * The end of a transfer also drops AK.
// All inputs other than rw and mrq1b are one-clock strobes.
module transfer_control
  import drum_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  ctl_word,
  input  logic  rw,        // 1 write to the drum, 0 read
  input  logic  t0,
  input  logic  t2,
  input  logic  mrq1b,
  input  logic  sp,
  input  logic  ap,
  input  logic  cp,
  input  logic  bp,
  input  logic  jp1,
  input  logic  jp3,
  input  logic  p2,
  input  logic  b11,
  input  logic  s,
  input  logic  sc,
  output b_op_e b_op,
  output logic  addr_load,
  output logic  addr_clear,
  output logic  drum_write,
  output logic  z_check,
  output logic  ak,
  output logic  q,
  output logic  h,
  output logic  n,
  output logic  r,
  output logic  y
);

  logic f;            // dependent register F
  logic addr_word, addr_step, w_start, rd_start;
  logic w_req, w_xfer, w_end, r_load, r_req, r_xfer, r_end;

  assign f         = b11 ^ sc;
  assign addr_word = q & ~h & t0;
  assign addr_step = f & n & p2 & t2;
  assign w_start   = rw  & f & h & ~n & sp & ~r & ~y;
  assign rd_start  = ~rw & (s == sc) & h & ~n & jp1 & ~r & ~y;
  assign w_req     = r & ap;
  assign w_xfer    = r & mrq1b & t0;
  assign w_end     = r & jp3;
  assign r_load    = y & bp;
  assign r_req     = y & cp;
  assign r_xfer    = y & mrq1b & t0;
  assign r_end     = y & jp1;

  assign addr_load  = addr_step;
  assign addr_clear = w_end | r_end;
  assign drum_write = r & cp;
  assign z_check    = r_xfer;

  always_comb begin
    b_op = B_HOLD;
    if (addr_word)                   b_op = B_LOAD_DMO;
    else if (addr_step && !rw)       b_op = B_CLEAR;
    else if (w_xfer)                 b_op = B_LOAD_DMO;
    else if (w_req)                  b_op = B_CLEAR;
    else if (r_load)                 b_op = B_LOAD_DRUM;
    else if (r_xfer)                 b_op = B_CLEAR;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q <= 1'b0; h <= 1'b0; n <= 1'b0; r <= 1'b0; y <= 1'b0; ak <= 1'b0;
    end else begin
      if (ctl_word) q <= 1'b1;
      if (addr_word) begin
        n <= 1'b1;
        h <= 1'b1;
      end
      if (addr_step) n <= 1'b0;
      if (w_start)  r <= 1'b1;
      if (rd_start) y <= 1'b1;
      if (w_end || r_end) begin
        q <= 1'b0; h <= 1'b0; r <= 1'b0; y <= 1'b0; ak <= 1'b0;
      end else if (w_req || r_req)
        ak <= 1'b1;
      else if (w_xfer || r_xfer)
        ak <= 1'b0;
    end
  end

  // A write and a read cycle never run together, and AK is only raised
  // inside one of them.
  a_excl: assert property (@(posedge clk) disable iff (!rst_n) !(r && y));
  a_ak:   assert property (@(posedge clk) disable iff (!rst_n) ak |-> (r || y));
  // The DMA controller answers only a raised request.
  a_mrq:  assert property (@(posedge clk) disable iff (!rst_n)
                           ((r || y) && mrq1b && t0) |-> ak);

endmodule
