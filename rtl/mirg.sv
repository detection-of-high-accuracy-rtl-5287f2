// mirg: multiple input ring generator used as the signature register.
//
// The register is a ring of L stages: every stage takes the one before it,
// and the last stage feeds back into stage 0 and, through XOR gates, into
// the stages named by the characteristic polynomial POLY (a primitive
// polynomial, so the register is a maximum-length compactor).  Every input
// channel c is injected, through an injector network of XOR gates, into two
// stages of its own, {c mod L, (c mod L) + 1 + c div L}; because no two
// channels share the same pair, errors arriving on different channels leave
// different marks in the signature, which helps tell failing columns apart.
//
// Interface and timing: when valid is high the register absorbs in_data at
// the clock edge; clear restarts the compaction from the all-zero state in
// the same cycle (used on the first word of every run), so consecutive
// runs need no idle cycle.  signature is the register itself.
module mirg #(
  parameter int unsigned   IN_W = 64,
  parameter int unsigned   L    = 32,
  parameter logic [L-1:0]  POLY = rom_diag_pkg::MIRG_POLY32
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            valid,
  input  logic            clear,
  input  logic [IN_W-1:0] in_data,
  output logic [L-1:0]    signature
);

  function automatic int unsigned stage_a(input int unsigned c);
    return c % L;
  endfunction

  function automatic int unsigned stage_b(input int unsigned c);
    return (c % L + 1 + c / L) % L;
  endfunction

  logic [L-1:0] cur;
  logic [L-1:0] nxt;

  always_comb begin
    cur = clear ? '0 : signature;
    nxt = {cur[L-2:0], 1'b0} ^ (cur[L-1] ? POLY : '0);
    for (int unsigned c = 0; c < IN_W; c++) begin
      nxt[stage_a(c)] = nxt[stage_a(c)] ^ in_data[c];
      nxt[stage_b(c)] = nxt[stage_b(c)] ^ in_data[c];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     signature <= '0;
    else if (valid) signature <= nxt;
  end

  // The injector pairs stay distinct only while 1 + c div L < L/2.
  initial assert (IN_W <= L * (L / 2 - 1))
    else $error("mirg: too many input channels for unique injector pairs");

endmodule
