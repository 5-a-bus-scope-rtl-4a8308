// Shared definitions for the bus scope.
//
// The scope has two word registers. Register 0 is the control/status word, register 1
// the data port. The control word packs, from the top bit down: the internal reset
// flag (written as "no reset"), stopped, triggered, primed, the manual trigger, the
// hardware-trigger disable, a zero bit, the log2 of the memory size in five bits and
// the holdoff count in the low twenty bits. The bit positions follow the register map
// of the original scope; the packed struct below is this implementation's way of
// naming them.
package busscope_pkg;

  // Word addresses of the two registers
  localparam logic ADDR_CONTROL = 1'b0;
  localparam logic ADDR_DATA    = 1'b1;

  // Bit positions inside the control word
  localparam int unsigned BIT_RESET     = 31; // read: reset in progress; write 1: do not reset
  localparam int unsigned BIT_STOPPED   = 30;
  localparam int unsigned BIT_TRIGGERED = 29;
  localparam int unsigned BIT_PRIMED    = 28;
  localparam int unsigned BIT_MANUAL    = 27; // write 1: manual trigger
  localparam int unsigned BIT_DISABLE   = 26; // 1: ignore the hardware trigger

  localparam int unsigned HOLDOFF_BITS  = 20;

  typedef struct packed {
    logic       reset;
    logic       stopped;
    logic       triggered;
    logic       primed;
    logic       manual;
    logic       disabled;
    logic       zero;
    logic [4:0] lgmem;
    logic [HOLDOFF_BITS-1:0] holdoff;
  } scope_ctrl_t;

  // Run-length code: bit 31 clear = a 31-bit sample, bit 31 set = repeat count
  localparam int unsigned RLE_FLAG = 31;

endpackage
