// cnu: check node unit of the FM-PGDBF decoder.
//
// Computes the parity-check value c_m = XOR of the dc variable-node bits
// connected to check m. c_m = 1 means the check is unsatisfied. Purely
// combinational; in the decoder one CNU exists per row of H and all M of them
// evaluate in the same clock cycle as the VNUs (flooding schedule), so the CNU
// sits on the one-cycle iteration path v -> c -> energy -> v.
//
// The XOR check node is the published one; nothing here is an own choice
// beyond the port names.
//
// Interface: v_in[DC] are the neighbouring VN bits, c is the check value.
module cnu #(
  parameter int unsigned DC = 8    // check node degree d_c
) (
  input  logic [DC-1:0] v_in,
  output logic          c
);
  always_comb c = ^v_in;
endmodule
