// DS (direct-sequence) spreading circuit: the PN generator and the mod-2
// adder.
//
// The information data is added modulo 2 (XOR) to the PN chip stream:
// ds = data ^ pn. A 0 data bit passes the PN sequence unchanged and a 1
// inverts it. As in the published circuit, the XOR is combinational on the
// output of the last PN stage. The data source holds one data bit for many
// chips. The PN generator advances on chip_en, and the next stage must
// sample ds in that same cycle.
//
// Ports: clk, rst_n; chip_en (chip strobe); data (information bit);
// pn (current chip); ds (spread chip).
module ds_circuit #(
  parameter int unsigned STAGES = dqpsk_pkg::PN_STAGES
) (
  input  logic clk,
  input  logic rst_n,
  input  logic chip_en,
  input  logic data,
  output logic pn,
  output logic ds
);

  pn_gen #(.STAGES(STAGES)) u_pn (
    .clk  (clk),
    .rst_n(rst_n),
    .en   (chip_en),
    .pn   (pn)
  );

  // Mod-2 addition of data and PN sequence.
  assign ds = data ^ pn;

endmodule
