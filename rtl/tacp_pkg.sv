// tacp_pkg: types and constants shared by the test and characterization
// processor (TACP) and its user communication unit.
//
// It holds the 6-bit instruction opcodes, the control word that one
// control-store entry drives into the data path, the sequencer's branch
// condition codes and the byte codes of the user protocol. Opcode values and
// protocol codes are the ones the design publishes; the control word's
// field order and the condition codes are this implementation's own
// encoding.
package tacp_pkg;

  // Memory address width (16-bit address ports on all three memories).
  localparam int unsigned ADDR_W = 16;
  // Micro-address = {opcode, step}; no instruction uses more than 9 steps.
  localparam int unsigned OPC_W  = 6;
  localparam int unsigned STEP_W = 4;
  localparam int unsigned UADDR_W = OPC_W + STEP_W;

  typedef enum logic [OPC_W-1:0] {
    OP_FETCH            = 6'h00,
    OP_APPLY_CAPTURE    = 6'h01,
    OP_CALL             = 6'h02,
    OP_COMPARE          = 6'h03,
    OP_DEC_CW           = 6'h04,
    OP_DEC_UC           = 6'h05,
    OP_INC_CW           = 6'h06,
    OP_INC_UC           = 6'h07,
    OP_JCOMPARE_CORRECT = 6'h08,
    OP_JCOMPARE_ERROR   = 6'h09,
    OP_JNZ              = 6'h0A,
    OP_JUMP             = 6'h0B,
    OP_JZ               = 6'h0C,
    OP_LOAD_DCREAD      = 6'h0D,
    OP_LOAD_RCREAD      = 6'h0F,
    OP_LOAD_RCWRITE     = 6'h10,
    OP_LOAD_UC_MEM      = 6'h11,
    OP_LOAD_UC_VALUE    = 6'h12,
    OP_MEASURE_FREQ     = 6'h14,
    OP_NOP              = 6'h15,
    OP_READ_FREQ_REG    = 6'h16,
    OP_READ_RESULT      = 6'h17,
    OP_RESET_CF         = 6'h18,
    OP_RESET_HFCLOCK    = 6'h19,
    OP_RETURN           = 6'h1A,
    OP_SEND_CW          = 6'h1B,
    OP_SEND_SEL_MASK    = 6'h1C,
    OP_SEND_TEST_DATA   = 6'h1D,
    OP_SET_CW           = 6'h1E,
    OP_SET_HFCLOCK      = 6'h1F,
    OP_STOP             = 6'h20,
    OP_STORE_UC         = 6'h21,
    OP_CLEAR_TD         = 6'h23
  } opcode_e;

  // Branch condition selected by the sequencer's control multiplexer.
  // COND_DISPATCH is detected by the selection-zero comparator and makes
  // the next micro-address {OpCode, 0}.
  typedef enum logic [3:0] {
    COND_DISPATCH   = 4'd0,
    COND_NEVER      = 4'd1,   // fall through to micro-address + 1
    COND_ALWAYS     = 4'd2,
    COND_NOT_NEXT   = 4'd3,   // not next_instruction
    COND_NOT_CRZ    = 4'd4,   // not CR_IsZero
    COND_NOT_WCZ    = 4'd5,   // not WC_IsZero
    COND_NOT_UCZ    = 4'd6,   // not UC_IsZero
    COND_UCZ        = 4'd7,   // UC_IsZero
    COND_NOT_CF     = 4'd8,   // not CF_IsNotEqual
    COND_CF         = 4'd9,   // CF_IsNotEqual
    COND_NOT_ACK    = 4'd10   // not HFCLK_Meas_ACK
  } cond_e;

  // Signals of one control-store entry that go to the data path or to the
  // chip (micro-operations).
  typedef struct packed {
    logic Increment_PC;
    logic Load_PC_Instruction2;
    logic Load_IR_Instruction;
    logic SetBusy;
    logic ResetBusy;
    logic Load_CR_Low_Instruction2;
    logic Load_CR_High_Instruction2;
    logic Decrement_CR;
    logic Load_WC_Instruction;
    logic Decrement_WC;
    logic Increment_DC;
    logic Load_DC_Instruction2;
    logic Load_TD_TestData;
    logic Shift_TestData;
    logic ClearTD;
    logic ClearTR;
    logic Store_TestResults_TR;
    logic Store_TestResults_Compare;
    logic Increment_RCWrite;
    logic Load_RCWrite_Instruction2;
    logic Increment_RCRead;
    logic Load_RCRead_Instruction2;
    logic Load_CW_Instruction2;
    logic INC_CW;
    logic DEC_CW;
    logic SetHFClock;
    logic ResetHFClock;
    logic ResetCF;
    logic Load_UC_Low;
    logic Load_UC_High;
    logic [3:0] Load_UC_TR;   // bit k: Load_UC_TR(k+1)
    logic [3:0] Store_UC;     // bit k: Store_UC(k+1)
    logic INC_UC;
    logic DEC_UC;
    logic DEC_SP;
    logic Push_PC1;
    logic Push_PC2;
    logic Pop1;
    logic Pop_PC2;
    logic AaC;
    logic HFCLK_Meas_Req;
    logic Strobe_in_PMask;
    logic Strobe_in_TData;
    logic Strobe_out_TR;
    logic Strobe_in_CLK_CR;
    logic Strobe_out_CLK_FR;
    logic IsStopInstruction;
  } uops_t;

  // One control-store entry: condition select, micro-operations, branch
  // address {opcode, step}.
  typedef struct packed {
    cond_e                sel;
    uops_t                ops;
    logic [UADDR_W-1:0]   branch;
  } cs_entry_t;

  // User protocol type-byte bit positions (Table of command codes).
  localparam int unsigned RX_BIT_CONTROL   = 7;
  localparam int unsigned RX_BIT_REQUEST   = 6;
  localparam int unsigned RX_BIT_MEM_WRITE = 5;
  localparam int unsigned RX_BIT_BYTE1ST   = 4;
  localparam int unsigned RX_BIT_LOAD      = 3;

  // User protocol command codes.
  localparam logic [7:0] CMD_LOAD_RX_COUNTER = 8'h18;
  localparam logic [7:0] CMD_LOAD_TX_COUNTER = 8'h19;
  localparam logic [7:0] CMD_LOAD_PCREAD     = 8'h1A;
  localparam logic [7:0] CMD_LOAD_PCWRITE    = 8'h1B;
  localparam logic [7:0] CMD_LOAD_DCREAD     = 8'h1C;
  localparam logic [7:0] CMD_LOAD_DCWRITE    = 8'h1D;
  localparam logic [7:0] CMD_LOAD_RCREAD     = 8'h1E;
  localparam logic [7:0] CMD_LOAD_RCWRITE    = 8'h1F;
  localparam logic [7:0] CMD_LOAD_BP         = 8'h9F;
  localparam logic [7:0] CMD_RECEIVE_INST    = 8'h20;
  localparam logic [7:0] CMD_RECEIVE_TD      = 8'h21;
  localparam logic [7:0] CMD_REQUEST_INST    = 8'h40;
  localparam logic [7:0] CMD_REQUEST_TD      = 8'h41;
  localparam logic [7:0] CMD_REQUEST_TR      = 8'h42;
  localparam logic [7:0] CMD_REQUEST_REGS    = 8'h53;
  localparam logic [7:0] CMD_SINGLE_STEP     = 8'h90;
  localparam logic [7:0] CMD_RUN             = 8'h91;
  localparam logic [7:0] CMD_RESET           = 8'h92;
  localparam logic [7:0] CMD_STOP            = 8'h93;

  // Decoded command flags.
  typedef struct packed {
    logic load;
    logic load_rx_counter;
    logic load_tx_counter;
    logic load_PCRead;
    logic load_PCWrite;
    logic load_DCRead;
    logic load_DCWrite;
    logic load_RCRead;
    logic load_RCWrite;
    logic load_BP;
    logic request_inst;
    logic request_td;
    logic request_tr;
    logic request_regs;
    logic mem_write_inst_td;
    logic SingleStep;
    logic Run;
    logic Reset;
    logic Stop;
  } rx_flags_t;

  // Number of bytes in the register dump ("Request registers"); the dump
  // index is the low five bits of the transmit counter, sent from
  // REG_DUMP_BYTES down to 1.
  localparam int unsigned REG_DUMP_BYTES = 29;

  // Data-path view handed to the enumerate multiplexer.
  typedef struct packed {
    logic [5:0]  IR;
    logic [15:0] SP;
    logic [31:0] UC;
    logic [15:0] CW;
    logic [15:0] FR;
    logic [7:0]  SM;
    logic [7:0]  TD;
    logic [7:0]  TR;
    logic        CF;
    logic        SF;
    logic        ZF;
    logic        Busy;
  } dp_view_t;

endpackage
