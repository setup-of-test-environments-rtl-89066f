// xor_chain_cram: device-under-test design of the configuration-memory
// (CRAM) test.
//
// The chain has N_CPE stages, one per logic element, each an 8-input XOR
// (the full input count of one element's lookup table). Stage 0 XORs seven
// copies of static_i with first_i; every later stage XORs the previous
// stage's output with seven copies of static_i. Because every stage is an
// XOR, flipping any single configuration bit of any stage changes chain_o,
// so the number of sensitive bits is known from the chain length. With all
// inputs low chain_o is 0; with all inputs high it is (N_CPE - 1) mod 2.
// The design is purely combinational; in the device its propagation time
// is about 12.6 us for 13866 stages. first_i is a separate input so that a
// tester can inject a flip at the head of the chain and time it; that
// split is this design's choice.
`timescale 1ns / 1ps
module xor_chain_cram #(
  parameter int unsigned N_CPE = 13866
) (
  input  logic static_i,
  input  logic first_i,
  output logic chain_o
);

  // One net per stage (g_cpe[i].s), so that every stage is its own
  // signal and the chain evaluates in a single ordered pass.
  for (genvar i = 0; i < N_CPE; i++) begin : g_cpe
    logic s;
    if (i == 0) begin : g_head
      assign s = ^{first_i, {7{static_i}}};
    end else begin : g_body
      assign s = ^{g_cpe[i-1].s, {7{static_i}}};
    end
  end

  assign chain_o = g_cpe[N_CPE-1].s;

endmodule
