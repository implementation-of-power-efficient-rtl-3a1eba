// ant_error_correction: error-correction block of the algorithmic noise-tolerant
// (ANT) multiplier.
//
// On every rising clock edge it samples the main-block product ya (2N bits) and
// the replica estimate yr (M bits). The estimate is placed on product bits
// [2N-1:2N-M] with zeros below (yr_full). From the sampled values it forms
// |ya - yr_full| and compares it with the threshold TH. If the difference is
// larger than TH the main product is taken to be corrupted and y_hat = yr_full;
// otherwise y_hat = ya. err_sel shows which was chosen.
//
// Timing: ya and yr are registered (one sampling clock), the subtract, compare
// and select after the registers are combinational, so y_hat and err_sel
// belong to the inputs of the previous clock edge. rst_n is an active-low
// asynchronous reset that clears both registers.
//
// The two sampling registers, the difference, the |.| > Th test and the MUX
// follow the design description; the reset, the strict ">" and the bit
// alignment of yr are this design's choices. TH defaults to the maximum
// replica error over all inputs (see ant_pkg).
module ant_error_correction #(
  parameter int unsigned N  = ant_pkg::N_DEFAULT,
  parameter int unsigned M  = ant_pkg::M_DEFAULT,
  parameter int unsigned TH = ant_pkg::TH_DEFAULT
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic [2*N-1:0] ya,
  input  logic [M-1:0]   yr,
  output logic [2*N-1:0] y_hat,
  output logic [2*N-1:0] ya_q,
  output logic [M-1:0]   yr_q,
  output logic           err_sel
);
  logic [2*N-1:0] yr_full;
  logic [2*N-1:0] diff;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ya_q <= '0;
      yr_q <= '0;
    end else begin
      ya_q <= ya;
      yr_q <= yr;
    end
  end

  assign yr_full = {yr_q, {(2*N-M){1'b0}}};
  assign diff    = (ya_q >= yr_full) ? (ya_q - yr_full) : (yr_full - ya_q);
  assign err_sel = (64'(diff) > 64'(TH));
  assign y_hat   = err_sel ? yr_full : ya_q;
endmodule
