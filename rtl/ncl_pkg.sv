// ncl_pkg: shared types for the NULL Convention Logic (NCL) divider.
//
// Every data bit in the design is dual-rail: two wires, rail1 and rail0.
// {0,0} is NULL (the spacer between data words), {0,1} is DATA0 and
// {1,0} is DATA1; {1,1} never occurs. Handshake signals (Ki, Ko) and the
// sequencer outputs are single-rail, with 1 meaning "request for DATA"
// (rfd) and 0 meaning "request for NULL" (rfn) on Ki/Ko. The encoding
// follows the usual NCL convention; the field order is this design's choice.
package ncl_pkg;

  typedef struct packed {
    logic rail1;
    logic rail0;
  } dr_t;

  localparam dr_t DR_NULL  = '{rail1: 1'b0, rail0: 1'b0};
  localparam dr_t DR_DATA0 = '{rail1: 1'b0, rail0: 1'b1};
  localparam dr_t DR_DATA1 = '{rail1: 1'b1, rail0: 1'b0};

  // DATA0/DATA1 encoding of a Boolean value
  function automatic dr_t dr_enc(input logic v);
    return v ? DR_DATA1 : DR_DATA0;
  endfunction

  function automatic logic dr_is_data(input dr_t x);
    return x.rail1 ^ x.rail0;
  endfunction

  function automatic logic dr_is_null(input dr_t x);
    return !(x.rail1 | x.rail0);
  endfunction

endpackage
