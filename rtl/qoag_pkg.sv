// qoag_pkg: constants shared by the QOAG input-buffered switch.
//
// The switch size, queues per input and buffers per queue are the
// evaluated configuration of the QOAG scheme (16x16 switch, two queues per
// input, twenty buffers per queue). The payload width is a choice of this
// design: the payload is an opaque tag carried with the output address.
package qoag_pkg;
  localparam int unsigned N_PORTS  = 16;  // switch size N
  localparam int unsigned Q_QUEUES = 2;   // queues per input port Q
  localparam int unsigned B_BUFS   = 20;  // packet buffers per queue B
  localparam int unsigned DW_DATA  = 32;  // payload width (design choice)
endpackage
