// stahl_scan_chain: scan chain of STAHL scan cells, the scan infrastructure
// of a design under test.
//
// N_CELLS scan cells share CK and EN; cell i's SO drives cell i+1's SI, the
// chain input is si and its output so. Every cell's D and Q connect to the
// combinational logic of the design, which lives outside this module: d[i]
// is what that logic presents to cell i and q[i] is what cell i drives into
// it. s[i] is the scan node after cell i (s[N_CELLS-1] = so).
//
// EN = 1 (shift): the lower flip-flops shift si towards so by one cell per
// rising CK edge while the upper flip-flops keep clocking the combinational
// logic, q[i] being the upper flip-flop. EN = 0 (function / capture): q[i]
// is the lower flip-flop, i.e. the value shifted in, and the next rising edge
// loads d[i] into both halves of each cell. How long EN is low before that
// edge decides what is captured: with a full cycle the logic's response to
// the shifted-in pattern (standard capture); with EN falling just before the
// edge, the response to the upper flip-flops' state, which the pattern has
// had no time to displace (fast capture).
//
// Only CK and EN are distributed to the cells in the published chain; their
// complements CKB and ENB are made here by one inverter each. N_CELLS = 3 is
// the published example. seu[i][0] and seu[i][1] inject strikes into STAHL-A
// and STAHL-B of cell i (fault injection only, see stahl_pkg).
module stahl_scan_chain
  import stahl_pkg::*;
#(
  parameter int unsigned N_CELLS = 3
) (
  input  logic                      ck,
  input  logic                      en,    // 1 = shift, 0 = function/capture
  input  logic                      si,    // scan in (S-IN)
  input  logic [N_CELLS-1:0]        d,     // from the combinational logic
  input  seu_t [N_CELLS-1:0][1:0]   seu,   // [cell][0 = STAHL-A, 1 = STAHL-B]
  output logic [N_CELLS-1:0]        q,     // to the combinational logic
  output logic [N_CELLS-1:0]        s,     // scan node after each cell
  output logic                      so     // scan out (S-OUT)
);

  logic ckb, enb;

  assign ckb = ~ck;
  assign enb = ~en;

  for (genvar i = 0; i < N_CELLS; i++) begin : g_cell
    logic cell_si;

    if (i == 0) begin : g_first
      assign cell_si = si;
    end else begin : g_next
      assign cell_si = s[i-1];
    end

    stahl_scan_cell u_cell (
      .ck   (ck),
      .ckb  (ckb),
      .en   (en),
      .enb  (enb),
      .d    (d[i]),
      .si   (cell_si),
      .seu_a(seu[i][0]),
      .seu_b(seu[i][1]),
      .q    (q[i]),
      .so   (s[i])
    );
  end

  assign so = s[N_CELLS-1];

endmodule
