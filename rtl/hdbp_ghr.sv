// hdbp_ghr: long global history register.
//
// Holds the outcomes of the last W resolved branches, bit 0 the newest.
// On upd_valid the register shifts up by one and takes upd_taken into bit 0.
// It is updated with resolved outcomes only (no speculative update and
// repair); that, and clearing it at reset, are this design's choices.
module hdbp_ghr #(
  parameter int unsigned W = hdbp_pkg::GHR_W
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         upd_valid,
  input  logic         upd_taken,
  output logic [W-1:0] ghr
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         ghr <= '0;
    else if (upd_valid) ghr <= {ghr[W-2:0], upd_taken};
  end

endmodule
