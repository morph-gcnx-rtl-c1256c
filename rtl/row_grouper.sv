// row_grouper: group-and-shuffle workload balancing. Given the number of
// nonzeros of each of R rows of a sparse tile, it ranks the rows by density
// and deals them to P PEs so that every PE gets a mix of dense and sparse
// rows: ranks 0..P-1 go to PEs 0..P-1, ranks P..2P-1 to PEs P-1..0, and so on
// (a snake order). With two rows per PE this pairs the densest row with the
// sparsest, the second densest with the second sparsest, as in the published
// 8-row, 4-PE example.
//
// Outputs, for each row: the PE it goes to and its slot (position) in that PE's
// group; and for each PE slot p*(R/P)+s: the original row, which the PE
// control side uses to put each result back in its original position. Ties
// in density rank the lower row first. start registers the result; valid
// rises one cycle later and stays until the next start.
module row_grouper #(
  parameter int unsigned R  = 8,
  parameter int unsigned P  = 4,
  parameter int unsigned CW = 16
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  logic [CW-1:0]        nnz       [R],
  output logic                 valid,
  output logic [$clog2(P)-1:0] pe_of_row [R],
  output logic [$clog2(R)-1:0] slot_of_row [R],
  output logic [$clog2(R)-1:0] row_of    [R]
);

  localparam int unsigned S = R / P;   // rows per PE

  int unsigned          rank [R];
  logic [$clog2(P)-1:0] pe_c   [R];
  logic [$clog2(R)-1:0] slot_c [R];
  logic [$clog2(R)-1:0] row_c  [R];

  always_comb begin
    for (int i = 0; i < R; i++) begin
      rank[i] = 0;
      for (int j = 0; j < R; j++)
        if (nnz[j] > nnz[i] || (nnz[j] == nnz[i] && j < i)) rank[i]++;
    end
    for (int i = 0; i < R; i++) begin
      slot_c[i] = ($clog2(R))'(rank[i] / P);
      pe_c[i]   = (slot_c[i] % 2 == 0) ? ($clog2(P))'(rank[i] % P)
                                       : ($clog2(P))'(P - 1 - rank[i] % P);
    end
    for (int q = 0; q < R; q++) row_c[q] = '0;
    for (int i = 0; i < R; i++) row_c[int'(pe_c[i]) * S + int'(slot_c[i])] = ($clog2(R))'(i);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid <= 1'b0;
      for (int i = 0; i < R; i++) begin
        pe_of_row[i]   <= '0;
        slot_of_row[i] <= '0;
        row_of[i]      <= '0;
      end
    end else if (start) begin
      valid       <= 1'b1;
      pe_of_row   <= pe_c;
      slot_of_row <= slot_c;
      row_of      <= row_c;
    end
  end

endmodule
