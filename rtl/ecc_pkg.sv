// ecc_pkg: constants and types shared by the ECC-protected RISC-V SoC fabric.
//
// Hsiao SEC-DED parity-check masks
//   Each mask selects the codeword bits whose XOR gives one syndrome bit. A
//   codeword is {check bits, data bits}: data in the low bits, check bit k at
//   position DATA_W + k, so the check-bit columns of H form an identity matrix.
//   All data columns have odd weight (3), are distinct and non-zero, and the
//   row weights are as even as possible (Hsiao's rules).
//
//   (13,8) code, used per byte of the data memory. Data columns (syndrome
//   bits s4..s0) are d0=01101 d1=11001 d2=00111 d3=10011 d4=10110 d5=11010
//   d6=11100 d7=01110. The columns of d0, d1, d3 and d7 and the sum of d2 and
//   d6 follow from the worked simulation example of this code (single error on
//   d0 gives syndrome 01101, 0xCE encodes to check bits 11111, ...); the order
//   of d2/d6 and the choice of d4/d5 are this design's own.
//
//   (39,32) code, used for the register file. The 32 data columns are the 35
//   weight-3 columns of 7 bits in lexicographic order of their row triples,
//   minus {0,1,2}, {0,3,4} and {1,5,6}; row weights are 13,13,14,14,14,14,14.
//
// Processor-internal bus
//   A request is started by a one-cycle 'stb' pulse; addr/rw/ben/data stay
//   valid until the addressed device answers with a one-cycle 'ack' (done) or
//   'err' (bus fault). Responses of all devices are OR-ed, so an idle device
//   drives all-zero.
package ecc_pkg;

  localparam int unsigned H13_CHK = 5;
  localparam logic [12:0] H13_MASK [H13_CHK] = '{
    13'h010F, 13'h02BC, 13'h04D5, 13'h08E3, 13'h107A
  };

  localparam int unsigned H39_CHK = 7;
  localparam logic [38:0] H39_MASK [H39_CHK] = '{
    39'h0100001FFF, 39'h02003FE00F, 39'h040FC1E0F0, 39'h0871CE2311,
    39'h10B6724C22, 39'h20DA949544, 39'h40ED291A88
  };

  // Memory map (Fig. "NEORV32 configuration")
  localparam logic [31:0] DMEM_BASE      = 32'h8000_0000;
  localparam int unsigned DMEM_SIZE      = 16 * 1024;     // bytes
  localparam logic [31:0] ENVM_BASE      = 32'h6000_0000;
  localparam logic [31:0] BUSKEEPER_ADDR = 32'hFFFF_FF78;

  // Bus keeper access window (cycles)
  localparam int unsigned BUS_TIMEOUT = 15;

  // AHB-Lite encodings
  localparam logic [1:0] HTRANS_IDLE   = 2'b00;
  localparam logic [1:0] HTRANS_NONSEQ = 2'b10;
  localparam logic [2:0] HSIZE_BYTE    = 3'b000;
  localparam logic [2:0] HSIZE_HALF    = 3'b001;
  localparam logic [2:0] HSIZE_WORD    = 3'b010;

  typedef struct packed {
    logic        stb;   // start of a transfer (one cycle)
    logic        rw;    // 1 = write
    logic [31:0] addr;  // byte address
    logic [3:0]  ben;   // byte enables
    logic [31:0] data;  // write data
  } bus_req_t;

  typedef struct packed {
    logic        ack;   // transfer done (one cycle)
    logic        err;   // bus fault (one cycle)
    logic [31:0] data;  // read data, valid with ack
  } bus_rsp_t;

  typedef enum logic [1:0] {
    ECC_OK     = 2'b00,
    ECC_SINGLE = 2'b01,   // corrected
    ECC_DOUBLE = 2'b10    // detected, not corrected
  } ecc_err_e;

endpackage
