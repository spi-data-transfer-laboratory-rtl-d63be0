// Shared constants of the SPI switch-to-LED transfer lab.
//
// DATA_W is the width of one SPI word: the four slide switches of each
// side and the four LEDs that show each side's register. The word is sent
// most significant bit first in both directions.
package spilab_pkg;
  localparam int unsigned DATA_W = 4;
endpackage
