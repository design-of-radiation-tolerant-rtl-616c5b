// seu_state_reg - state register of a finite state machine, protected by an
// extended Hamming code.
//
// The register holds the encoded (protected) state value. Every cycle the
// stored word is decoded, the corrected value drives the state machine's
// next-state logic through 'state', and the next state is encoded and written
// back: state value -> Hamming encoding -> protected value -> Hamming
// decoding -> next state. A single flipped bit is therefore corrected in the
// cycle after it appears and never reaches the state machine. A double error
// cannot be corrected: the register then presents and reloads INIT_STATE (the
// state machine's initial state), which is the "refresh" the design applies.
// The external 'refresh' input forces the same reload, so a double error in
// one state machine can restart the others.
//
// 'inject' is a verification port that models particle strikes: its bits are
// XORed into the word written on the same clock edge. Tie it to zero in a
// real chip.
//
// Timing: one register; 'state', 'single_err' and 'double_err' are
// combinational from the stored word. Asynchronous active-low reset loads the
// encoded INIT_STATE.
module seu_state_reg
  import roic_pkg::*;
#(
  parameter int                 K          = 4,
  // initial state, in the low K bits
  parameter logic [HAM_MAX-1:0] INIT_STATE = '0,
  parameter int                 N          = ham_n(K)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         refresh,
  input  logic [K-1:0] next_state,
  input  logic [N-1:0] inject,
  output logic [K-1:0] state,
  output logic         single_err,
  output logic         double_err
);

  localparam logic [K-1:0] INIT_K    = K'(INIT_STATE);
  localparam logic [N-1:0] INIT_CODE = N'(ham_encode(HAM_MAX'(INIT_K), K));

  logic [N-1:0] code_q;
  logic [N-1:0] code_d;
  logic [K-1:0] decoded;
  logic [K-1:0] next_eff;

  hamming_dec #(.K(K)) u_dec (
    .code       (code_q),
    .data       (decoded),
    .single_err (single_err),
    .double_err (double_err)
  );

  assign state    = double_err ? INIT_K : decoded;
  assign next_eff = (double_err || refresh) ? INIT_K : next_state;

  hamming_enc #(.K(K)) u_enc (
    .data (next_eff),
    .code (code_d)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) code_q <= INIT_CODE;
    else        code_q <= code_d ^ inject;
  end

endmodule
