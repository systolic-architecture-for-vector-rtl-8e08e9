// vq_compare_cell: one comparing cell of the index selector.
//
// The cell holds a fixed identifier ID, the row of the distortion array it
// is attached to. Each phi2 period it compares the running minimum b (with
// identifier ib) arriving from the cell above with the current distortion c
// of its own row, and registers for the cell below
//     if (b < c) { z <= b; iz <= ib } else { z <= c; iz <= ID }.
// This is exactly the cell rule of the architecture, including its tie rule:
// on equal distortions the current row (the later one) wins. Identifiers
// are 0-based here (row r has ID r); the architecture numbers them from 1.
module vq_compare_cell #(
  parameter int unsigned DW = vq_pkg::dist_width(vq_pkg::W_DEFAULT, vq_pkg::K_DEFAULT),
  parameter int unsigned IW = vq_pkg::id_width(vq_pkg::N_DEFAULT),
  parameter int unsigned ID = 0
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          en,    // phi2 enable
  input  logic [DW-1:0] b,     // running minimum, from above
  input  logic [IW-1:0] ib,    // its identifier
  input  logic [DW-1:0] c,     // current distortion, from the left
  output logic [DW-1:0] z,     // new running minimum, downward
  output logic [IW-1:0] iz     // its identifier
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      z  <= '0;
      iz <= '0;
    end else if (en) begin
      if (b < c) begin
        z  <= b;
        iz <= ib;
      end else begin
        z  <= c;
        iz <= IW'(ID);
      end
    end
  end

endmodule
