// oldest_comparator: finds, bit-serially, the candidate with the largest timestamp
// among N stored packets, and encodes its position as an 8-bit slot address.
//
// How it works (the document's scheme): `start` sets every bit of the candidate
// register to 1. Each following clock the register file delivers one timestamp bit
// of every slot, most significant bit first; non-candidates deliver 0. The bits are
// caught in an input register and ANDed with the candidate register. If the AND is
// all zero (the zero detector), no candidate has a 1 in that position, the position
// tells nothing apart, and the candidate register keeps its value; otherwise it
// takes the AND. The search ends after TS_W bits, or earlier as soon as exactly one
// candidate is left (the encoder's one-detector). The encoder then turns the
// surviving bit into its address. Both detectors are built from
// multi_high_detector groups of 16 signals.
//
// This design's own choices: a tie (equal timestamps) is broken towards the lowest
// address and flagged on `tie`; `found` is low when no slot delivered a 1 in any
// position, so a stored timestamp must never be zero (the controller keeps its
// top bit at 1); the document's feedback through a 2:1 multiplexer is written as
// an equivalent select after the AND, which avoids a combinational loop.
//
// Interface and timing: pulse `start` for one clock, then present bit k of the
// timestamps on `bits` with `bit_valid` high, k from TS_W-1 down. Bits are
// registered first, so the candidate register changes one clock after a bit is
// presented. `done` pulses for one clock, one clock after the last bit that was
// used is applied; `found`, `addr` and `tie` hold from `done` until the next
// `start`. Bits offered while idle are ignored.
module oldest_comparator
  import atm_ctrl_pkg::*;
#(
  parameter int unsigned N     = N_SLOTS,
  parameter int unsigned NBITS = TS_W,
  parameter int unsigned G     = 16          // signals per detector group
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  logic                 bit_valid,
  input  logic [N-1:0]         bits,
  output logic                 busy,
  output logic                 done,
  output logic                 found,
  output logic                 tie,
  output logic [$clog2(N)-1:0] addr,
  output logic [N-1:0]         survivors       // candidate register, for observation
);
  localparam int unsigned NG  = N / G;
  localparam int unsigned AW  = $clog2(N);
  localparam int unsigned GW  = $clog2(G);
  localparam int unsigned CW  = $clog2(NBITS + 1);

  logic [N-1:0]  in_q;      // 256-bit input register
  logic          in_v;
  logic [N-1:0]  mask_q;    // candidate register
  logic [N-1:0]  and_res;
  logic [CW-1:0] count_q;   // bit positions applied since start
  logic          hit_q;     // some position had a non-zero AND

  // Zero detector over the AND result.
  logic [NG-1:0] z_any, z_multi;
  logic          and_any, and_multi;
  // One-detector over the candidate register.
  logic [NG-1:0] e_any, e_multi;
  logic          m_any, m_multi, m_single;

  assign and_res = in_q & mask_q;

  for (genvar g = 0; g < NG; g++) begin : g_det
    multi_high_detector #(.N(G)) u_zero (
      .in (and_res[g*G +: G]), .any_hi (z_any[g]), .multi_hi (z_multi[g]));
    multi_high_detector #(.N(G)) u_one (
      .in (mask_q[g*G +: G]),  .any_hi (e_any[g]), .multi_hi (e_multi[g]));
  end
  multi_high_detector #(.N(NG)) u_zero_top (
    .in (z_any), .any_hi (and_any), .multi_hi (and_multi));
  multi_high_detector #(.N(NG)) u_one_top (
    .in (e_any), .any_hi (m_any), .multi_hi (m_multi));

  // Exactly one survivor: one group has a bit, and that group has only one.
  assign m_single = m_any && !m_multi && !(|(e_any & e_multi));

  // Encoder: first group with a survivor, then first survivor in that group.
  always_comb begin
    logic [GW-1:0]      pos;
    logic [AW-GW-1:0]   grp;
    grp = '0;
    pos = '0;
    for (int g = NG - 1; g >= 0; g--)
      if (e_any[g]) grp = (AW-GW)'(g);
    for (int i = G - 1; i >= 0; i--)
      if (mask_q[int'(grp) * G + i]) pos = GW'(i);
    addr = {grp, pos};
  end

  logic finish;
  assign finish = busy && ((count_q == CW'(NBITS)) || (count_q != '0 && m_single));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_q    <= '0;
      in_v    <= 1'b0;
      mask_q  <= '0;
      count_q <= '0;
      hit_q   <= 1'b0;
      busy    <= 1'b0;
      done    <= 1'b0;
    end else begin
      done <= 1'b0;
      in_q <= bits;
      in_v <= bit_valid && busy && !start;
      if (start) begin
        mask_q  <= '1;
        count_q <= '0;
        hit_q   <= 1'b0;
        busy    <= 1'b1;
        in_v    <= 1'b0;
      end else if (finish) begin
        busy <= 1'b0;
        done <= 1'b1;
        in_v <= 1'b0;
      end else if (busy && in_v) begin
        if (and_any) begin
          mask_q <= and_res;
          hit_q  <= 1'b1;
        end
        count_q <= count_q + 1'b1;
      end
    end
  end

  assign found     = hit_q;
  assign tie       = hit_q && m_any && !m_single;
  assign survivors = mask_q;

  // A search result is only meaningful if the candidate register is not empty.
  assert property (@(posedge clk) disable iff (!rst_n) done |-> m_any);
endmodule
