// indoor_localization: the two hardware functions of the secure RFID indoor localization
// system, side by side.
//
// The LANDMARC engine (landmarc) estimates the position of a target tag from the RSSI that four
// readers measure for it and for nine reference tags on a grid. The S-DES cipher (sdes) is the
// keyed pseudo-random function f with which reader and tag authenticate each other before
// readings are trusted: each side computes ID xor f_k(0|r1|r2) and ID xor f_k(1|r1|r2) from the
// two random challenges. The design does not connect the two functions; the protocol around
// the cipher (random numbers, message exchange, the search for the tag's ID) runs on a
// processor, so the cipher's ports are brought out here unchanged.
//
// Interface and timing: see landmarc (start/busy/done, done 68 clocks after start) and sdes
// (combinational: sdes_dout follows sdes_key and sdes_din). Reset is synchronous, active high,
// and applies to the localization engine only.
module indoor_localization
  import landmarc_pkg::*;
(
  input  logic                          clk,
  input  logic                          reset,
  // localization
  input  logic                          start,
  input  logic [N_REF-1:0][TAG_W-1:0]   ref_tag,
  input  logic [TAG_W-1:0]              target,
  output logic                          busy,
  output logic                          done,
  output logic [K_NN-1:0][DIST_W-1:0]   nearest,
  output logic [K_NN-1:0][WREC_W-1:0]   w_out,
  output logic [POS_W-1:0]              pos_x,
  output logic [POS_W-1:0]              pos_y,
  // authentication cipher
  input  logic [9:0]                    sdes_key,
  input  logic [7:0]                    sdes_din,
  output logic [7:0]                    sdes_dout
);

  landmarc u_landmarc (
    .clk     (clk),
    .reset   (reset),
    .start   (start),
    .ref_tag (ref_tag),
    .target  (target),
    .busy    (busy),
    .done    (done),
    .nearest (nearest),
    .w_out   (w_out),
    .pos_x   (pos_x),
    .pos_y   (pos_y)
  );

  sdes u_sdes (
    .key  (sdes_key),
    .din  (sdes_din),
    .dout (sdes_dout)
  );

endmodule
