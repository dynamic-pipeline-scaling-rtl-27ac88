// dps_agen: load/store address generation split for early cache indexing.
//
// In deep mode a load or store goes through A1, A2/M1 and M2. The adder is cut
// at bit 16 like the ALU: A1 adds the low half-words of base and offset,
// which already gives the cache index bits, so the cache access (M1) starts in
// the next cycle while the high half of the address is added in parallel
// (A2). The full address is then ready for the tag comparison in M2. In
// shallow mode the A1/A2 latch is transparent: the whole address is formed in
// the single A stage and the M stage gets index and tag bits together.
//
// The stage split follows the original design. The 16-bit cut, the 32-bit byte
// offset input (sign extension done before this unit) and the output
// registers are this design's choices.
//
// Interface and timing (in_* presented in cycle c):
//   deep:    m1_valid/m1_index in cycle c+1 (low address half-word),
//            m2_valid/m2_addr  in cycle c+2 (full address)
//   shallow: m1_* and m2_* both in cycle c+1 (the single M stage)
module dps_agen
  import dps_pkg::*;
#(
  parameter int unsigned TAGW = 8       // tag carried with each access
) (
  input  logic            clk,
  input  logic            rst_n,
  input  dps_mode_e       mode,
  input  logic            in_valid,
  input  logic [TAGW-1:0] in_tag,
  input  logic [XLEN-1:0] in_base,
  input  logic [XLEN-1:0] in_offset,
  output logic            m1_valid,
  output logic [TAGW-1:0] m1_tag,
  output logic [HLEN-1:0] m1_index,
  output logic            m2_valid,
  output logic [TAGW-1:0] m2_tag,
  output logic [XLEN-1:0] m2_addr
);
  typedef struct packed {
    logic            v;
    logic [TAGW-1:0] tag;
    logic [HLEN-1:0] lo;
    logic            carry;
    logic [HLEN-1:0] base_hi, off_hi;
  } a1_t;

  typedef struct packed {
    logic            v;
    logic [TAGW-1:0] tag;
    logic [XLEN-1:0] addr;
  } a2_t;

  a1_t a1_d, a1_q, a1_r;
  a2_t a2_d, a2_q;
  logic deep;
  assign deep = (mode == MODE_DEEP);

  // A1: low half-word and carry
  always_comb begin
    logic [HLEN:0] s;
    s = {1'b0, in_base[HLEN-1:0]} + {1'b0, in_offset[HLEN-1:0]};
    a1_d = '{v: in_valid, tag: in_tag, lo: s[HLEN-1:0], carry: s[HLEN],
             base_hi: in_base[XLEN-1:HLEN], off_hi: in_offset[XLEN-1:HLEN]};
  end

  dps_cfg_latch #(.W($bits(a1_t))) u_a1 (
    .clk, .rst_n, .transparent(!deep), .en(1'b1), .d(a1_d), .q(a1_q), .stored(a1_r)
  );

  // A2 (in parallel with M1): high half-word
  always_comb begin
    logic [HLEN-1:0] hi;
    hi = a1_q.base_hi + a1_q.off_hi + {15'd0, a1_q.carry};
    a2_d = '{v: a1_q.v, tag: a1_q.tag, addr: {hi, a1_q.lo}};
  end

  always_ff @(posedge clk) begin
    if (!rst_n) a2_q <= '0;
    else        a2_q <= a2_d;
  end

  // M1 sees the index from the A1 register in deep mode, from the A register
  // (same as M2) in shallow mode
  always_comb begin
    m1_valid = deep ? a1_r.v   : a2_q.v;
    m1_tag   = deep ? a1_r.tag : a2_q.tag;
    m1_index = deep ? a1_r.lo  : a2_q.addr[HLEN-1:0];
    m2_valid = a2_q.v;
    m2_tag   = a2_q.tag;
    m2_addr  = a2_q.addr;
  end
endmodule
