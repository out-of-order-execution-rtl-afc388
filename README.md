# Tomasulo out-of-order core with tag broadcast and a reorder buffer

A small out-of-order machine that lets independent instructions overtake a
stalled one. In a plain in-order pipeline, an instruction whose source value
is not yet ready blocks every younger instruction behind it, even ones that
have nothing to do with it. This core moves such instructions aside into
**reservation stations**, lets them wait there for their operands, and sends
whichever instruction has all its operands to its functional unit, in
dataflow order rather than program order. A **reorder buffer** then puts the
results back into program order before they become architectural state, so
that an exception leaves the register file exactly as in-order execution
would.

The machine has two functional units, a pipelined 4-cycle adder and a
pipelined 6-cycle multiplier, each fed by its own 4-entry reservation station
and each owning its own result bus. It executes register-to-register
`ADD` and `MUL` instructions on registers R0..R11.

## The central idea: names are station entries

Every value still being computed is named by a **tag**: the reservation-station
entry that will produce it. There are eight tags, one per station entry:

| tag | 0 | 1 | 2 | 3 | 4 | 5 | 6 | 7 |
|-----|---|---|---|---|---|---|---|---|
| entry | ADD a | ADD b | ADD c | ADD d | MUL x | MUL y | MUL z | MUL t |

(The top bit selects the station, the low two bits the entry.)

The **frontend register file** (also called the register alias table) holds,
for each architectural register, either a valid value or the tag of its
latest pending writer:

| field | meaning |
|-------|---------|
| Valid | 1: `Value` is current. 0: the register waits for `Tag` |
| Tag   | station entry that will write this register |
| Value | the value, when Valid |

Each reservation-station entry holds the same three fields for each of its
two sources. Renaming a destination register to a fresh tag is what removes
false dependences: a later write to R5 gets a different tag from an earlier
one, so readers of the old R5 and readers of the new R5 never confuse the two.
Because the tag is the station entry itself, there is no separate free list:
a tag is free exactly when its entry is free.

## Life of an instruction

**Decode and rename** (`rename_issue`, `frontend_rf`). One instruction per
cycle, in program order:

1. check that the station of the needed unit has a free entry (lowest index
   first) and that the reorder buffer has a free slot; otherwise the
   instruction stalls at decode, and so does everything behind it;
2. read both sources from the frontend register file;
3. write the sources (value if valid, else tag) into the free entry, together
   with the reorder-buffer slot;
4. rename the destination register to the entry's tag (Valid := 0).

If a source's producer is broadcasting in the very cycle the consumer is
decoded, the read takes the value from the bus; otherwise the consumer would
wait for a tag that will never appear again.

**Wait and wake up** (`reservation_station`). Every cycle each waiting source
compares its tag with the tags on both result buses and copies the value on a
match. An entry whose two sources are valid is *ready*.

**Select and execute** (`reservation_station`, `add_unit`, `mul_unit`). Each
station sends its lowest-numbered ready entry to its unit, one per cycle. The
units are fully pipelined, so a new operation can start every cycle; results
leave in dispatch order, one per cycle at most, and a unit's bus never needs
arbitration.

**Broadcast** (`fu_pipe`). In its last execute cycle the unit puts tag, value,
reorder-buffer slot and exception flag on its bus. In that same cycle:
waiting station entries with a matching source tag take the value; the
frontend register file writes the value into every register that is still
invalid and still carries this tag (a register renamed again by a younger
instruction keeps its newer tag and ignores the broadcast); the producing
station entry is freed, which reclaims the tag; the reorder buffer marks the
slot written.

**Retire** (`reorder_buffer`, `arch_regfile`). The oldest slot retires once it
is written, one per cycle: its value goes into the **architectural register
file**, which therefore changes only in program order.

## Timing

An instruction accepted at decode in cycle *t* can start executing in cycle
*t*+1. A result is on the bus in the unit's last execute cycle *E*; the
register file shows it from cycle *E*+1, and a consumer woken by it starts
executing in cycle *E*+1 too. So a dependent instruction starts exactly
`latency` cycles after its producer started (4 behind an ADD, 6 behind a MUL).

The reference program (registers initially Ri = i, fetched one per cycle from
cycle 1, decoded from cycle 2):

| instruction         | tag | decode | execute | on bus | visible | result |
|---------------------|-----|--------|---------|--------|---------|--------|
| MUL R1, R2 -> R3    | x   | 2      | 3-8     | 8      | 9       | 2      |
| ADD R3, R4 -> R5    | a   | 3      | 9-12    | 12     | 13      | 6      |
| ADD R2, R6 -> R7    | b   | 4      | 5-8     | 8      | 9       | 8      |
| ADD R8, R9 -> R10   | c   | 5      | 6-9     | 9      | 10      | 17     |
| MUL R7, R10 -> R11  | y   | 6      | 10-15   | 15     | 16      | 136    |
| ADD R5, R11 -> R5   | d   | 7      | 16-19   | 19     | 20      | 142    |

R5 is renamed twice (to `a`, then to `d`); when `a` broadcasts in cycle 12
the register file ignores it, because R5 already waits for `d`, but entry `d`
takes the 6. In cycle 8 both buses broadcast at once. The third and fourth
instructions overtake the second, which waits five cycles for the multiply.
The whole program has written its last result in cycle 20.

## Precise exceptions and flush

Each reorder-buffer slot holds Valid, destination register, value, Written and
an exception flag. In this design an instruction carries an `exc` bit at
decode that stands for "this instruction faults when it executes"; the unit
returns it with the result. When the oldest slot is written and has the flag
set, the buffer raises `exception` for one cycle instead of retiring. At that
clock edge every station and unit pipeline is emptied, the reorder buffer is
emptied, and the frontend register file is overwritten with the contents of
the architectural register file, all valid. The machine is then in the exact
state after the last instruction older than the faulting one, and the front
end can restart wherever it chooses; `exception_rob` says which slot faulted.
Nothing is decoded in the flush cycle.

Results are written into the frontend register file at completion, out of
order, and into the architectural file at retirement, in order; the flush
copy is what reconciles the two.

## Modules

```
tomasulo_top
 ├─ rename_issue          decode, rename, stall           (combinational)
 ├─ frontend_rf           Valid/Tag/Value per register, bus update, flush reload
 ├─ reservation_station   UNIT=ADD, 4 entries (tags a-d)
 ├─ reservation_station   UNIT=MUL, 4 entries (tags x,y,z,t)
 ├─ add_unit ── fu_pipe   4-cycle pipelined adder, drives add_bus
 ├─ mul_unit ── fu_pipe   6-cycle pipelined multiplier, drives mul_bus
 ├─ reorder_buffer        16 slots, in-order retire, flush
 └─ arch_regfile          values only, written at retirement
tomasulo_pkg              sizes and types (instr_t, operand_t, rs_payload_t, fu_op_t, cdb_t)
```

Each file begins with a description of its interface and timing.

### Top-level ports

| port | dir | meaning |
|------|-----|---------|
| `clk`, `rst_n` | in | clock, asynchronous active-low reset |
| `init_we`, `init_idx`, `init_value` | in | write a value into both register files; use while `idle` |
| `instr_valid`, `instr`, `instr_ready` | in/in/out | decode port, valid/ready handshake; `instr_t` = {op, src1, src2, dst, exc} |
| `add_bus`, `mul_bus` | out | each unit's result bus (`cdb_t`: valid, tag, rob, exc, value) |
| `retire_valid`, `retire_dst`, `retire_value` | out | one in-order retirement |
| `exception`, `exception_rob` | out | flush and the faulting slot |
| `stall`, `idle` | out | decode holds an instruction; nothing in flight |
| `frontend_regs`, `arch_regs` | out | both register files |
| `add_rs_busy`, `mul_rs_busy`, `add_rs_entries`, `mul_rs_entries` | out | station contents |

### Sizes

All in `tomasulo_pkg`:

| constant | value | note |
|----------|-------|------|
| `RS_ENTRIES` | 4 | per station; the tag has `1 + log2(RS_ENTRIES)` bits |
| `ADD_LATENCY` | 4 | execute cycles, bus driven in the last |
| `MUL_LATENCY` | 6 | |
| `ROB_ENTRIES` | 16 | |
| `NUM_REGS` | 12 | R0..R11 |
| `DATA_W` | 32 | results wrap modulo 2^32; MUL keeps the low half |

Change a size by editing the package; the structs follow. `add_unit` and
`mul_unit` also take a `LATENCY` parameter.

## What is this design's own choice

The organisation (tags as station entries, Valid/Tag/Value everywhere, wakeup
by tag comparison, one result bus per unit, update of the register file by
tag match, in-order retirement, flush by copying the architectural file) and
the sizes and latencies follow the Tomasulo scheme as described above. The
following are choices made here where that description is silent:

- the result is broadcast in the last execute cycle, not in a separate
  write-back cycle; the cycle after it is the first in which the value is
  visible;
- both units are fully pipelined (the multiplier's throughput was not given);
- lowest-index allocation and lowest-index select, not oldest-first;
- a station entry is freed when its result is broadcast, not at dispatch, so
  that its tag is never reused while still in flight;
- same-cycle bypass from the buses into decode, and a rename beating a
  broadcast to the same register;
- decode also stalls on a full reorder buffer; one retirement per cycle;
- exceptions come from a per-instruction `exc` flag, since ADD and MUL have
  no defined fault here;
- instruction format, 32-bit data, the register-initialisation port, reset
  to valid zeros.

## Not included

- **Fetch.** The machine starts at decode; whatever supplies `instr` plays
  the role of the fetch stage, including restart after an exception.
- **Loads and stores.** There is no memory unit; a program with loads does
  not run on this core.
- **Physical-register-file organisation.** A variant that keeps values only
  in a central physical register file, with frontend and architectural maps
  of pointers, is a known alternative to storing values in stations, register
  file and reorder buffer. It is not built, since its allocation and freeing
  policy would have to be invented.

## Verification

Every module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`:

| testbench | what it checks |
|-----------|----------------|
| `tb_tomasulo_top` | the reference program cycle by cycle (bus, tag, value and cycle of every broadcast, alias table and station contents after renaming, cycle each result becomes visible, final registers); reorder buffer filling behind a multiply chain; 900 random instructions, some faulting, against an in-order model, including state after every flush; two further short programs; counts out-of-order completion, wakeups, simultaneous broadcasts, decode bypass, station-full and reorder-buffer-full stalls, double renaming and flushes, each of which must occur |
| `tb_reservation_station` | allocation, wakeup, select and free against a model; dispatch the cycle after allocation or broadcast; flush |
| `tb_frontend_rf` | reads with bypass, rename, tag-matched update, rename priority, flush reload |
| `tb_rename_issue` | first decode of the reference program; random accept/stall and payload |
| `tb_reorder_buffer` | in-order retirement with out-of-order completion, flush only from the oldest, full at 16 |
| `tb_add_unit`, `tb_mul_unit` | value and exact latency of every result, flush |
| `tb_arch_regfile` | writes and priority |

`tb_tomasulo_top` runs the core at its default sizes. To run a testbench with
Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl -y tb \
    rtl/tomasulo_pkg.sv tb/tb_tomasulo_top.sv --top-module tb_tomasulo_top -o sim
./obj_dir/sim
```

Replace `tb_tomasulo_top` with any other testbench name. The testbenches use
`$urandom` only and need no data files.
