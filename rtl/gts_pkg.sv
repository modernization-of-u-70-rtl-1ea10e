// gts_pkg: types and constants shared by the General Timing System blocks.
//
// A timing message (TM) is a tandem of two MIL-STD-1553 words: a Command
// Word that carries the event code and stands for one 10 kHz clock pulse,
// and a Data Word with operational data (cycle number, pulse-to-pulse
// modulation mode, ...). The event code is taken from the low EVENT_W bits
// of the Command Word; the remaining bits travel unchanged. The bit layout
// inside the words and the 8-bit event code width are this design's choice.
//
// A MIL-STD-1553 bus has three line states (positive, negative, idle). A
// line is modelled here as a pair {act, lvl}: act=0 is the idle bus, and
// when act=1, lvl is the polarity of the current half-bit.
package gts_pkg;

  localparam int unsigned WORD_W   = 16;
  localparam int unsigned EVENT_W  = 8;
  localparam int unsigned N_EVENTS = 1 << EVENT_W;
  // Bit times of one MIL-STD-1553 word: 3 sync + 16 data + 1 parity.
  localparam int unsigned WORD_HALFBITS = 40;

  typedef logic [WORD_W-1:0]  word_t;
  typedef logic [EVENT_W-1:0] event_t;

  typedef struct packed {
    word_t cw;  // Command Word: event code + clock pulse
    word_t dw;  // Data Word: operational data
  } tm_t;

  typedef struct packed {
    logic act;  // bus driven
    logic lvl;  // polarity of the current half-bit
  } mil_line_t;

  localparam mil_line_t LINE_IDLE = '{act: 1'b0, lvl: 1'b0};

  // Host (equipment controller SBC) register write port of a TMG.
  typedef enum logic [3:0] {
    SEL_MASK_LOC_GTN = 4'd0,  // local-pulse events  -> global network
    SEL_MASK_LOC_LTN = 4'd1,  // local-pulse events  -> local network
    SEL_MASK_PRG_GTN = 4'd2,  // programmed events   -> global network
    SEL_MASK_PRG_LTN = 4'd3,  // programmed events   -> local network
    SEL_MASK_GLB_GTN = 4'd4,  // global events       -> global network (forwarding)
    SEL_MASK_GLB_LTN = 4'd5,  // global events       -> local network
    SEL_RAM_LOC      = 4'd6,  // local event code RAM, addr = channel
    SEL_RAM_PRG      = 4'd7,  // programmed event code RAM, addr = 10 kHz slot
    SEL_OPDATA       = 4'd8,  // operational data sent as the Data Word
    SEL_CYCLE_LEN    = 4'd9   // number of 10 kHz slots in the cycle
  } cfg_sel_e;

  typedef struct packed {
    logic        we;
    cfg_sel_e    sel;
    logic [19:0] addr;
    word_t       data;   // for a mask write, data[0] opens (1) or closes (0) the gate
  } cfg_t;

  localparam cfg_t CFG_NONE = '{we: 1'b0, sel: SEL_OPDATA, addr: '0, data: '0};

  // One archived timing message: RTC seconds, 100 us units within the
  // second, and the two words. Stored as five 16-bit FLASH words, most
  // significant first.
  typedef struct packed {
    logic [31:0] sec;
    logic [15:0] sub;
    word_t       cw;
    word_t       dw;
  } arch_rec_t;

  localparam int unsigned REC_WORDS = 5;

  // Operations of the FLASH port of the archiving device.
  typedef enum logic [1:0] {FL_READ = 2'd0, FL_WRITE = 2'd1, FL_ERASE = 2'd2} fl_op_e;

  // Tasks of the archiving device (codes sent by the external computer).
  typedef enum logic [1:0] {
    TASK_ARCHIVE  = 2'd1,   // buffer messages, archive them to FLASH
    TASK_TRANSFER = 2'd2,   // send the FLASH contents to the computer
    TASK_SET_TIME = 2'd3    // correct the RTC
  } task_e;

  function automatic event_t event_of(tm_t m);
    return m.cw[EVENT_W-1:0];
  endfunction

  // MIL-STD-1553 parity bit: makes the number of ones in data+parity odd.
  function automatic logic odd_parity(word_t w);
    return ~(^w);
  endfunction

  // Half-bit pattern of one word, first half-bit in bit 39. Sync is 1.5 bit
  // times high then 1.5 low for a Command Word, the inverse for a Data Word.
  // Manchester II: a one is high-then-low, a zero low-then-high.
  function automatic logic [WORD_HALFBITS-1:0] word_pattern(word_t w, logic is_cmd);
    logic [WORD_HALFBITS-1:0] p;
    p[39:34] = is_cmd ? 6'b111000 : 6'b000111;
    for (int i = 0; i < 16; i++) begin
      p[33-2*i -: 2] = w[15-i] ? 2'b10 : 2'b01;
    end
    p[1:0] = odd_parity(w) ? 2'b10 : 2'b01;
    return p;
  endfunction

endpackage
