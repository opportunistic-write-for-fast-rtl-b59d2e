// Temperature-driven choice between Lazy-ECC and conventional ECC.
//
// At low temperature the total error rate (write errors plus retention
// failures) is small and speculative Lazy-ECC reads are fastest. Retention
// failures grow exponentially with temperature, and each detected error
// costs a correction, a write-back and a refetch, so above a threshold
// temperature waiting for the full decoder on every read (conventional ECC)
// is faster. The total error rate follows the temperature monotonically, so
// comparing the sensor reading with a threshold temperature is the same as
// comparing the error rate with its threshold.
//
// Interface: temp_i is the on-chip thermal sensor reading in degrees Celsius
// (signed); mode_o is MODE_CONV at or above TEMP_TH and MODE_LAZY below it.
// Timing: mode_o is registered (one cycle after temp_i); after reset it is
// MODE_LAZY. Users sample it only between accesses.
// From the document: the hybrid scheme and the 80 C threshold for cells with
// thermal stability factor 30. The sensor format is this design's choice.
module ecc_mode_selector
  import lazy_ecc_pkg::*;
#(
  parameter int TEMP_TH = 80
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic signed [7:0] temp_i,
  output ecc_mode_e         mode_o
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) mode_o <= MODE_LAZY;
    else        mode_o <= (int'(temp_i) >= TEMP_TH) ? MODE_CONV : MODE_LAZY;
  end

endmodule
