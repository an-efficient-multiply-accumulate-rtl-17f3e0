// vedic_pkg: widths shared by the 16-bit Vedic multiply-accumulate unit.
//
// The operand width (16), the product width (32) and the accumulator width
// (64) are the sizes of the Data A/B, Multiply out and Data out registers of
// the MAC datapath. Nothing else lives here; the modules take these as
// parameter defaults so that a single place fixes the datapath sizes.
package vedic_pkg;
  localparam int unsigned MUL_W  = 16;          // operand width of the multiplier
  localparam int unsigned PROD_W = 2 * MUL_W;   // width of the product / Multiply out register
  localparam int unsigned ACC_W  = 64;          // width of the Data out (accumulator) register
endpackage
