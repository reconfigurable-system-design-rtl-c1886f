// fpfa_pkg: widths, operation encodings and configuration word layouts shared by
// the FPFA tile.
//
// Data flows through a tile in three widths: 16-bit words in the local memories,
// 20-bit words (19 bits + sign) in the register banks, on the crossbar and at the
// ALU ports, and 40-bit words inside ALU levels two and three and on the East-West
// chain. Fixed-point operands are Q1.15 in 16 bits, so the fixed-point position of
// a 40-bit word is bit 15 (FP_SHIFT); that position is this design's choice.
//
// Every data-path entity of a processing part has a 32-bit configuration word held
// in a configuration register (CR1..CR5). The ALU field names follow the control
// names of the ALU drawing (ctf1..ctf3, selmx, selmy, selme, cta, selmz, selmb,
// selmo1, selmo2); their encodings, and the layouts of the other four words, are
// this design's own. Unused bits are marked spare and ignored.
package fpfa_pkg;

  localparam int DW       = 20;   // register / crossbar / ALU port width
  localparam int MW       = 16;   // local memory word width
  localparam int ZW       = 40;   // ALU internal width (levels 2 and 3)
  localparam int MAGW     = 19;   // multiplier operand magnitude width
  localparam int FP_SHIFT = 15;   // fixed-point position (Q1.15 operands)
  localparam int NPP      = 5;    // processing parts per tile
  localparam int NBUS     = 10;   // crossbar buses per tile
  localparam int BSW      = 4;    // bits of a bus index
  localparam int MDEPTH   = 256;  // words per local memory
  localparam int MAW      = 8;    // local memory address width
  localparam int CODE_W   = 6;    // tile instruction code width
  localparam int NSRC_PP  = 4;    // crossbar sources per processing part
  localparam int CFG_W    = 32;   // configuration word width

  // Level-one function block operations.
  typedef enum logic [2:0] {
    F_ADD = 3'd0, F_SUB = 3'd1, F_ABS = 3'd2, F_MIN = 3'd3, F_MAX = 3'd4
  } fop_e;

  typedef enum logic [1:0] { MX_A, MX_B, MX_C, MX_D } selmx_e;
  typedef enum logic [2:0] { MY_A, MY_B, MY_C, MY_D, MY_Z1 } selmy_e;
  typedef enum logic [1:0] { ME_ZERO, ME_DFP, ME_DSE, ME_EAST } selme_e;
  typedef enum logic [0:0] { MZ_Z1, MZ_MAC } selmz_e;
  typedef enum logic [1:0] { MB_ZERO, MB_CSE, MB_CD, MB_CFP } selmb_e;
  typedef enum logic [1:0] { MO1_O1FP, MO1_O1LO, MO1_O1HI, MO1_O2LO } selmo1_e;
  typedef enum logic [1:0] { MO2_O2FP, MO2_O2LO, MO2_O2HI, MO2_O1HI } selmo2_e;

  // ALU function fields: 24 bits.
  typedef struct packed {
    fop_e    ctf1;
    fop_e    ctf2;
    fop_e    ctf3;
    selmx_e  selmx;
    selmy_e  selmy;
    selme_e  selme;
    logic    cta;      // 1: subtract the mE value from the product
    selmz_e  selmz;
    selmb_e  selmb;
    selmo1_e selmo1;
    selmo2_e selmo2;
  } alu_fn_t;

  // CR1: ALU configuration, with the read address of each input register bank.
  typedef struct packed {
    logic [3:0][1:0] raddr;   // [0]=a ... [3]=d
    alu_fn_t         fn;
  } cr1_t;

  // CR2: register bank writes and output registers.
  typedef struct packed {
    logic [15:0]     spare;
    logic [1:0]      o_bypass; // [0]=out1 register, [1]=out2 register
    logic [1:0]      o_load;
    logic [3:0][1:0] waddr;
    logic [3:0]      we;
  } cr2_t;

  // CR3: crossbar taps of the register banks and output registers.
  typedef struct packed {
    logic [5:0]          spare;
    logic [1:0][BSW-1:0] odrv_bus;  // bus driven by output register 0/1
    logic [1:0]          odrv_en;
    logic [3:0][BSW-1:0] insel;     // bus feeding register bank a..d
  } cr3_t;

  // Memory address register update.
  typedef enum logic [1:0] {
    AOP_HOLD   = 2'd0,   // keep the address
    AOP_BASE   = 2'd1,   // address <= base
    AOP_STRIDE = 2'd2,   // address <= address + stride
    AOP_INDEX  = 2'd3    // address <= base + low 8 bits of the selected bus
  } aop_e;

  // CR4 / CR5: local memory configuration.
  typedef struct packed {
    logic [3:0]     spare;
    logic [MAW-1:0] stride;
    logic [MAW-1:0] base;
    aop_e           aop;
    logic [BSW-1:0] drv_bus;  // bus driven by the read port
    logic           drv_en;
    logic           we;       // write the selected bus into mem[address]
    logic [BSW-1:0] wsel;     // bus selected for write data / index
  } memcfg_t;

  // Configuration register selects of one processing part: 10 bits.
  typedef struct packed {
    logic [1:0] cr45;  // shared by CR4 and CR5
    logic [2:0] cr3;
    logic [2:0] cr2;
    logic [1:0] cr1;
  } ppsel_t;

  // Tile control program word: 16 bits.
  typedef enum logic [1:0] {
    SQ_NEXT = 2'd0,  // issue code, go to next word
    SQ_LOOP = 2'd1,  // issue code; if counter != 0: counter--, jump to target
    SQ_SETC = 2'd2,  // issue code; counter <= target, go to next word
    SQ_HALT = 2'd3   // issue code and stop
  } sqop_e;

  typedef struct packed {
    logic [1:0]        spare;
    sqop_e             op;
    logic [5:0]        target;
    logic [CODE_W-1:0] code;
  } sqword_t;

  // Host port targets of the tile.
  typedef enum logic [2:0] {
    H_CR = 3'd0, H_DEC = 3'd1, H_PROG = 3'd2, H_MEM = 3'd3
  } htgt_e;

  // Sign extension and fixed-point placement helpers.
  function automatic logic signed [ZW-1:0] sext(input logic [DW-1:0] v);
    return ZW'(signed'(v));
  endfunction

  function automatic logic signed [ZW-1:0] to_fp(input logic [DW-1:0] v);
    return sext(v) <<< FP_SHIFT;
  endfunction

  // Value on crossbar bus i; an index beyond the last bus reads as 0.
  function automatic logic [DW-1:0] bus_pick(input logic [NBUS-1:0][DW-1:0] bus,
                                             input logic [BSW-1:0] i);
    return (int'(i) < NBUS) ? bus[i] : '0;
  endfunction

endpackage
