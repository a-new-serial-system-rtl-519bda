// camac_serial_pkg: constants, message layouts and dataway types shared by the
// serial CAMAC branch driver (SBD), the serial crate controller (SCC) and the
// line encoder/decoder.
//
// Line format. Every message is a sync pulse (line high for two bit times)
// followed by three line-control bits A (direction: 0 command, 1 response),
// B (type) and C (word length: 0 = 16 bits, 1 = 24 bits) and the body. All
// fields are sent least significant bit first, in the order listed below.
// Inside this design a message is held as a vector whose bit 0 is sent first.
//
//   CAMAC command   A B C = 0 0 D   crate[4] F[5] N[5] A[4]         21 bits
//   write data      A B C = 0 1 0   W1..W16 (W17..W24 if D = 1)     19/27 bits
//   short command   A B C = 0 1 1   (repeat last command)            3 bits
//   read response   A B C = 1 0 D   Q X L R1..R16 (R17..R24)        22/30 bits
//   L-read response A B C = 1 0 1   I LE L L1..L24                   30 bits
//   short response  A B C = 1 1 0   Q X L                             6 bits
//
// The field widths and order of the command, the A B C meanings and the
// short-command code 011 follow the published line protocol; the exact A B C
// codes of the three responses and of write data are this design's reading
// of it. The clock is 40 MHz, eight clocks per 200 ns bit (5 Mbit/s); the
// line rate is the published one, the clock rate is this design's choice.
package camac_serial_pkg;

  // ---- timing -------------------------------------------------------------
  localparam int unsigned CLK_MHZ      = 40;  // system clock
  localparam int unsigned DEF_CLKS_PER_BIT = 8;   // 200 ns bit at 40 MHz
  localparam int unsigned DEF_STEP_CLKS = 4;  // 100 ns dataway count step

  // ---- message layout -----------------------------------------------------
  localparam int unsigned MSG_MAX  = 30;      // longest message body + header
  localparam int unsigned LEN_W    = 5;       // width of a message length

  localparam int unsigned LEN_CMD   = 21;
  localparam int unsigned LEN_WR16  = 19;
  localparam int unsigned LEN_WR24  = 27;
  localparam int unsigned LEN_SHORT = 3;
  localparam int unsigned LEN_RD16  = 22;
  localparam int unsigned LEN_RD24  = 30;
  localparam int unsigned LEN_SRESP = 6;

  // bit positions inside a message vector
  localparam int unsigned POS_A     = 0;
  localparam int unsigned POS_B     = 1;
  localparam int unsigned POS_C     = 2;
  localparam int unsigned POS_CRATE = 3;   // command: crate[3:0]
  localparam int unsigned POS_F     = 7;   // command: F[4:0]
  localparam int unsigned POS_N     = 12;  // command: N[4:0]
  localparam int unsigned POS_SUB   = 17;  // command: A[3:0]
  localparam int unsigned POS_WDATA = 3;   // write data: W1..
  localparam int unsigned POS_Q     = 3;   // response: Q (I in an L read)
  localparam int unsigned POS_X     = 4;   // response: X (L enable in an L read)
  localparam int unsigned POS_L     = 5;   // response: gated OR of L
  localparam int unsigned POS_RDATA = 6;   // response: R1.. / L1..

  typedef logic [MSG_MAX-1:0] msg_t;
  typedef logic [LEN_W-1:0]   len_t;

  // ---- CAMAC --------------------------------------------------------------
  localparam logic [4:0] N_SPECIAL   = 5'd30;  // the SCC itself
  localparam logic [4:0] N_BROADCAST = 5'd28;  // all stations at once
  localparam int unsigned N_STATIONS = 23;     // normal stations 1..23

  typedef enum logic [1:0] {FC_READ, FC_WRITE, FC_CONTROL} fclass_t;

  // F0..F7 read, F16..F23 write, every other code is dataless (control)
  function automatic fclass_t f_class(input logic [4:0] f);
    if (f[4:3] == 2'b00)      return FC_READ;
    else if (f[4:3] == 2'b10) return FC_WRITE;
    else                      return FC_CONTROL;
  endfunction

  // signals a crate controller drives onto its dataway
  typedef struct packed {
    logic [N_STATIONS:1] n;   // station select lines, one per station
    logic [3:0]          a;   // subaddress
    logic [4:0]          f;   // function code
    logic [24:1]         w;   // write lines
    logic                b;   // busy
    logic                s1;  // strobe 1
    logic                s2;  // strobe 2
    logic                c;   // clear
    logic                z;   // initialise
    logic                i;   // inhibit (a level)
  } dw_cmd_t;

  // signals the modules of a crate return on the dataway
  typedef struct packed {
    logic [24:1]         r;   // read lines
    logic                q;   // response
    logic                x;   // command accepted
    logic [N_STATIONS:1] l;   // look-at-me, one per station
  } dw_resp_t;

  // ---- SBD control word (24 bits, loaded by F17) ---------------------------
  typedef struct packed {
    logic       lx;   // LAM on no X
    logic       lq;   // LAM on no Q
    logic       sc;   // scan crate
    logic       sn;   // scan station
    logic       sa;   // scan subaddress
  } scan_mode_t;

  typedef struct packed {
    scan_mode_t mode;  // W24..W20
    logic       d;     // W19: 0 = 16-bit, 1 = 24-bit data
    logic [3:0] c;     // W18..W15: crate
    logic [4:0] f;     // W14..W10: function
    logic [4:0] n;     // W9..W5: station
    logic [3:0] a;     // W4..W1: subaddress
  } ctrl_word_t;

endpackage
