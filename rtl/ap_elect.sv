// ap_elect - election of the first active EP (token chain with bypass).
//
// A token enters at EP 0 and travels through the status registers towards the
// last EP; the first EP whose request (status) is set keeps it, so exactly
// one EP - the first active one - sees `first` set. The source architecture
// describes this combinational token chain and says that extra resources let
// the token bypass the normal path to avoid the delay of a long chain; how
// is not given. Here the EPs are cut into groups of GROUP: each group computes
// the OR of its requests, and the token skips a whole group in one step when
// that OR is 0 (the carry-skip idea). The group size is this design's choice.
//
// Expansion over several chips: `tok_in` is 1 when no EP before this array is
// active (tie to 1 on the first chip) and `tok_out` is 1 when the token
// leaves this array unclaimed, i.e. when tok_in is 1 and no request is set.
// Combinational.
module ap_elect #(
  parameter int unsigned N     = 1024,
  parameter int unsigned GROUP = 32
) (
  input  logic [N-1:0] req,
  input  logic         tok_in,
  output logic [N-1:0] first,
  output logic         tok_out
);

  localparam int unsigned NG = (N + GROUP - 1) / GROUP;
  localparam int unsigned NP = NG * GROUP;

  logic [NP-1:0] req_p, first_p;
  logic [NG-1:0] grp_any;
  logic [NG:0]   gtok;      // token at the entry of each group (bypass path)

  assign req_p = NP'(req);

  always_comb begin
    for (int unsigned g = 0; g < NG; g++)
      grp_any[g] = |req_p[g*GROUP +: GROUP];
  end

  // Bypass chain: one AND per group.
  always_comb begin
    logic t;
    t = tok_in;
    for (int unsigned g = 0; g < NG; g++) begin
      gtok[g] = t;
      t = t & ~grp_any[g];
    end
    gtok[NG] = t;
  end

  // Normal ripple path inside each group.
  always_comb begin
    logic t;
    for (int unsigned g = 0; g < NG; g++) begin
      t = gtok[g];
      for (int unsigned k = 0; k < GROUP; k++) begin
        first_p[g*GROUP + k] = t & req_p[g*GROUP + k];
        t = t & ~req_p[g*GROUP + k];
      end
    end
  end

  assign first   = first_p[N-1:0];
  assign tok_out = gtok[NG];

endmodule
