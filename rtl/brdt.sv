// brdt: branch register dependency table.
//
// One entry per physical register. Bit i of an entry says that the value
// now held in that register depends on work done i branches back, that is
// in the basic block that ended i branches before the current one. Bit 0 is
// the current basic block. A branch whose condition reads registers A and B
// therefore finds, in entry A OR entry B, the positions of the global
// history that are correlated with it, and the highest set bit tells how
// long the useful history is.
//
// Update rules (the table's contents follow the published scheme, these rules are
// this design's own reading of it):
//  * register write (wr_valid): the destination entry becomes 0...01 --
//    the latest value was produced in the current block;
//  * branch (br_age): every entry shifts up by one position, bit 0 clears.
//    The top bit is sticky: a dependency that drifts beyond the table's
//    width stays recorded in the MSB as "at least WIDTH branches back";
//  * a write in the same cycle as br_age is older than the branch: its new
//    value is aged together with the rest.
// Reads (rd_*) are combinational and see the table before this cycle's
// updates. Reset clears every entry (no known dependency).
module brdt #(
  parameter int unsigned NUM_REGS = hdbp_pkg::NUM_REGS,
  parameter int unsigned WIDTH    = hdbp_pkg::BRDT_W,
  localparam int unsigned RW      = $clog2(NUM_REGS)
) (
  input  logic             clk,
  input  logic             rst_n,
  // register-writing instruction
  input  logic             wr_valid,
  input  logic [RW-1:0]    wr_dst,
  // a branch closes the current basic block
  input  logic             br_age,
  // lookup for the branch being predicted
  input  logic             rd_src1_valid,
  input  logic [RW-1:0]    rd_src1,
  input  logic             rd_src2_valid,
  input  logic [RW-1:0]    rd_src2,
  output logic [WIDTH-1:0] rd_entry
);

  logic [WIDTH-1:0] tbl [NUM_REGS];
  localparam logic [WIDTH-1:0] WR_DEP = WIDTH'(1);

  function automatic logic [WIDTH-1:0] age(input logic [WIDTH-1:0] e);
    logic [WIDTH-1:0] a;
    a = e << 1;
    a[WIDTH-1] = e[WIDTH-1] | e[WIDTH-2];
    return a;
  endfunction

  always_comb begin
    rd_entry = '0;
    if (rd_src1_valid) rd_entry |= tbl[rd_src1];
    if (rd_src2_valid) rd_entry |= tbl[rd_src2];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < NUM_REGS; r++) tbl[r] <= '0;
    end else begin
      for (int r = 0; r < NUM_REGS; r++) begin
        if (wr_valid && wr_dst == RW'(r))
          tbl[r] <= br_age ? age(WR_DEP) : WR_DEP;
        else if (br_age)
          tbl[r] <= age(tbl[r]);
      end
    end
  end

  initial begin
    assert (WIDTH >= 3) else $error("brdt: WIDTH must be at least 3");
    assert (NUM_REGS >= 2) else $error("brdt: NUM_REGS must be at least 2");
  end

endmodule
