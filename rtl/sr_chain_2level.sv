// sr_chain_2level: two-level shift-register chain that drives the word lines
// of the block-access memory directly, replacing an address counter plus
// decoder.
//
// One token marks the selected word line. Its position is held in two
// levels. Level two (L2) is a ring of S registers giving the select lines
// Sel0..Sel(S-1); level one (L1) is a chain of R1 registers per cluster, and
// each L1 register serves S word lines. Word line w = (L1 index)*S + select
// is high when its L1 register and its select line are both set:
//   wl[(k*R1 + j)*S + s] = L1[k][j] & L2[k][s]
// for cluster k, L1 register j, select s. There are C = W/(R1*S) clusters and
// each cluster keeps its own copy of the L2 ring, so the shift_2 signal loads
// C*S = W/R1 registers and each local shift_1 signal only R1 registers.
//
// A shift by +1 rotates L2; when L2 passes its final location the level-one
// chain moves by one (local shift_1). A programmed step of any size moves L2
// by step mod S and L1 by step div S plus the carry out of L2; a negative step
// shifts backwards. A cluster's L1 registers are only updated (its local
// shift_1 fires) when the token is in that cluster or enters it.
//
// Interface: load with load_l1 (one-hot over C*R1) and load_l2 (one-hot over
// S) from the address predecoders; shift with a signed step. wl[W-1:0] is
// the registered token, valid in the cycle after load or shift. load wins
// over shift.
//
// From the source design: two levels, clusters with local shift_1, W = 256,
// R1 = 16, S = 4 (so C = 4 and W/R1 = 16). Own choices: the multi-position
// step done in one clock, register-based (not dynamic) storage, the load
// priority.
module sr_chain_2level #(
  parameter int unsigned W  = 256,
  parameter int unsigned R1 = 16,
  parameter int unsigned S  = 4,
  parameter int unsigned SW = 9,
  localparam int unsigned C   = W / (R1 * S),
  localparam int unsigned NL1 = C * R1,
  localparam int unsigned SB  = (S > 1) ? $clog2(S) : 1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  load,
  input  logic [NL1-1:0]        load_l1,
  input  logic [S-1:0]          load_l2,
  input  logic                  shift,
  input  logic signed [SW-1:0]  step,
  output logic [W-1:0]          wl,
  output logic [C-1:0]          shift1    // local shift_1 enables, for observation
);

  logic [NL1-1:0] l1;
  logic [S-1:0]   l2 [C];

  // Step split into L2 rotation (0..S-1) and L1 move (floor division).
  logic [SB-1:0]            rot;
  logic signed [SW-1:0]     q;
  logic                     carry;
  logic signed [SW:0]       mv;
  logic [S-1:0]             l2_next;
  logic [NL1-1:0]           l1_next;

  always_comb begin
    rot   = SB'(step);
    q     = step >>> SB;
    carry = 1'b0;
    for (int s = 0; s < S; s++) begin
      if (l2[0][s] && (s + int'(rot)) >= int'(S)) carry = 1'b1;
    end
    mv = (SW+1)'(q) + (SW+1)'(carry);
    l2_next = '0;
    for (int s = 0; s < S; s++) begin
      l2_next[(s + int'(rot)) % S] = l2[0][s];
    end
    if (mv >= 0) l1_next = l1 << mv;
    else         l1_next = l1 >> (-mv);
  end

  // Local shift_1 of each cluster.
  always_comb begin
    for (int k = 0; k < C; k++) begin
      shift1[k] = shift && !load && (mv != 0) &&
                  ((|l1[k*R1 +: R1]) || (|l1_next[k*R1 +: R1]));
    end
  end

  for (genvar k = 0; k < C; k++) begin : g_cluster
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        l1[k*R1 +: R1] <= '0;
        l2[k]          <= '0;
      end else if (load) begin
        l1[k*R1 +: R1] <= load_l1[k*R1 +: R1];
        l2[k]          <= load_l2;
      end else if (shift) begin
        l2[k] <= l2_next;                                 // shift_2
        if (shift1[k]) l1[k*R1 +: R1] <= l1_next[k*R1 +: R1];
      end
    end

    for (genvar j = 0; j < R1; j++) begin : g_l1
      for (genvar s = 0; s < S; s++) begin : g_sel
        assign wl[(k*R1 + j)*S + s] = l1[k*R1 + j] & l2[k][s];
      end
    end
  end

  initial begin
    assert (W == C * R1 * S) else $error("sr_chain_2level: W must equal C*R1*S");
    assert (S == (1 << SB)) else $error("sr_chain_2level: S must be a power of two");
  end

endmodule
