// power_selector: power adaptive choice of the cipher.
//
// The device power level (for example a battery gauge reading) is compared
// with two thresholds. A high level selects the cipher with the highest power
// use and performance (AEGIS), an intermediate level selects Deoxys-II, and a
// low level selects the lightest cipher (ASCON).
//
// Interface: level is an unsigned reading of LEVEL_W bits; cls is its class,
// cipher the chosen cipher. Purely combinational.
//
// The mapping high->AEGIS, intermediate->Deoxys-II, low->ASCON follows the
// source design. The reading width and the two thresholds (a level at or above
// HIGH_TH is high, at or above MID_TH is intermediate) are this design's own.
module power_selector
  import dsec_pkg::*;
#(
  parameter int unsigned LEVEL_W = 8,
  parameter int unsigned MID_TH  = 85,
  parameter int unsigned HIGH_TH = 170
) (
  input  logic [LEVEL_W-1:0] level,
  output pwr_class_e         cls,
  output cipher_e            cipher
);

  always_comb begin
    if (level >= LEVEL_W'(HIGH_TH))     cls = PWR_HIGH;
    else if (level >= LEVEL_W'(MID_TH)) cls = PWR_MID;
    else                                cls = PWR_LOW;
    unique case (cls)
      PWR_HIGH: cipher = CIPHER_AEGIS;
      PWR_MID:  cipher = CIPHER_DEOXYS;
      default:  cipher = CIPHER_ASCON;
    endcase
  end

endmodule
